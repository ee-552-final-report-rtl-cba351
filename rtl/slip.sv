// slip: the SLIP unit of the SLIP link interface (receive and transmit).
//
// Receive: serialin is deserialised by uart_rx. Each received byte is
// un-escaped (ESC ESC_END -> END, ESC ESC_ESC -> ESC) and written to the
// packet buffer at once: write is high for one cycle with data and address,
// and address then advances by one. An END byte closes the packet: pktRead
// pulses high for one cycle and the next byte is stored at address 0. An
// END with no bytes before it (the line-noise flush RFC 1055 allows) does not
// pulse pktRead. Bytes beyond the last buffer address are dropped, and a
// byte with a bad stop bit is dropped and cancels a pending ESC.
//
// Transmit: while outready is high, a one-cycle out_load pulse takes
// serial_out_data, and a one-cycle out_finished pulse ends the packet. A byte
// equal to END or ESC goes out as the two-byte escape sequence, others as
// they are; out_finished sends END. enableserialout is high from the first
// byte of a packet until its END has left the line; out_finished always
// sends END, even with no byte before it. The transmit side is
// cleared by soutclr, the receive side by reset.
//
// The port names, the 9-bit address, the special characters and the
// store-each-byte-at-once behaviour follow the design description. The
// buffer is clocked by the same clock as this unit (no separate slip_clock
// output), and the empty-packet and overflow rules are this design's choice.
module slip
  import netcon_pkg::*;
#(
  parameter int unsigned CLK_HZ = 25_175_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              soutclr,
  // serial line
  input  logic              serialin,
  output logic              serialout,
  output logic              enableserialout,
  output logic              outready,
  // to the SLIP buffer
  output logic [7:0]        data,
  output logic [BUF_AW-1:0] address,
  output logic              write,
  output logic              pktRead,
  // transmit request
  input  logic [7:0]        serial_out_data,
  input  logic              out_load,
  input  logic              out_finished
);
  // ---------------- receive ----------------
  logic [7:0] rx_byte;
  logic       rx_valid, rx_ferr;
  logic       esc_seen;
  logic       full;          // address has passed the last location
  logic [BUF_AW-1:0] next_addr;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk(clock), .rst(reset), .rxd(serialin),
    .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      esc_seen  <= 1'b0;
      full      <= 1'b0;
      next_addr <= '0;
      address   <= '0;
      data      <= '0;
      write     <= 1'b0;
      pktRead   <= 1'b0;
    end else begin
      write   <= 1'b0;
      pktRead <= 1'b0;
      if (rx_ferr) begin
        esc_seen <= 1'b0;            // a broken byte cancels a pending escape
      end else if (rx_valid) begin
        if (rx_byte == SLIP_END) begin
          esc_seen  <= 1'b0;
          full      <= 1'b0;
          next_addr <= '0;
          pktRead   <= (next_addr != '0) || full;
        end else if (rx_byte == SLIP_ESC && !esc_seen) begin
          esc_seen <= 1'b1;
        end else begin
          esc_seen <= 1'b0;
          if (!full) begin
            address <= next_addr;
            write   <= 1'b1;
            if (esc_seen && rx_byte == SLIP_ESC_END)      data <= SLIP_END;
            else if (esc_seen && rx_byte == SLIP_ESC_ESC) data <= SLIP_ESC;
            else                                           data <= rx_byte;
            next_addr <= next_addr + 1'b1;
            if (next_addr == '1) full <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- transmit ----------------
  logic [7:0] tx_byte;
  logic       tx_load, tx_ready;
  logic       second_pending;   // escape's second byte still to send
  logic [7:0] second_byte;
  logic       end_pending;      // END still to send
  logic       end_queued;       // END handed to the UART

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk(clock), .rst(soutclr), .data(tx_byte), .load(tx_load),
    .txd(serialout), .ready(tx_ready)
  );

  // accept a new request only when nothing is queued and the UART is free
  assign outready = tx_ready && !tx_load && !second_pending && !end_pending;

  always_ff @(posedge clock) begin
    if (soutclr) begin
      tx_byte         <= '0;
      tx_load         <= 1'b0;
      second_pending  <= 1'b0;
      second_byte     <= '0;
      end_pending     <= 1'b0;
      end_queued      <= 1'b0;
      enableserialout <= 1'b0;
    end else begin
      tx_load <= 1'b0;
      if (outready && out_load) begin
        tx_load         <= 1'b1;
        enableserialout <= 1'b1;
        if (serial_out_data == SLIP_END) begin
          tx_byte        <= SLIP_ESC;
          second_byte    <= SLIP_ESC_END;
          second_pending <= 1'b1;
        end else if (serial_out_data == SLIP_ESC) begin
          tx_byte        <= SLIP_ESC;
          second_byte    <= SLIP_ESC_ESC;
          second_pending <= 1'b1;
        end else begin
          tx_byte <= serial_out_data;
        end
      end else if (outready && out_finished) begin
        end_pending     <= 1'b1;
        enableserialout <= 1'b1;
      end else if (tx_ready && !tx_load && second_pending) begin
        tx_load        <= 1'b1;
        tx_byte        <= second_byte;
        second_pending <= 1'b0;
      end else if (tx_ready && !tx_load && end_pending && !end_queued) begin
        tx_load    <= 1'b1;
        tx_byte    <= SLIP_END;
        end_queued <= 1'b1;
      end else if (tx_ready && !tx_load && end_pending) begin
        end_pending     <= 1'b0; // END has left the line
        end_queued      <= 1'b0;
        enableserialout <= 1'b0;
      end
    end
  end

  // the receive side never sees both a write and pktRead in one cycle
  a_no_write_with_end: assert property (@(posedge clock) disable iff (reset)
    !(write && pktRead));
endmodule
