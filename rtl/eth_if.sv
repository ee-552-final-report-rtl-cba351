// eth_if: Ethernet interface (ethIF) to a CS8900A controller in 8-bit I/O
// mode.
//
// The chip keeps received frames in its own RAM; this block fetches them for
// the network controller. After reset it reads the chip's product ID
// (chip_ok is high if it is the CS8900A value 0x630E), then enables
// reception of every good frame in promiscuous mode (RxCTL) and switches the
// receiver on (LineCTL); init_done then goes high. After that it serves two
// requests from the network controller, each a four-phase handshake: the
// request is held high, the acknowledge rises when the work is done and
// stays high until the request falls.
//
//   poll_req / poll_ack  - read the chip's RxEvent register; pkt_avail (valid
//                          with poll_ack) is high if a good frame is waiting.
//                          A frame already reported and not yet loaded is
//                          reported again without asking the chip, because
//                          reading RxEvent clears its flag.
//   load_req / load_ack  - copy the waiting frame into the packet buffer:
//                          read RxStatus and RxLength, then RxLength bytes
//                          from the receive data port, writing byte i to
//                          buffer address i (bytes past the buffer's end are
//                          read from the chip and dropped). pkt_len (valid
//                          with load_ack) is the frame length, 0 if no frame
//                          was waiting.
//
// Chip bus: sa is the 4-bit I/O address, data_o/data_oe/data_i the split
// 8-bit bidirectional data bus (the three-state pad is outside), ior_n and
// iow_n the active-low read and write strobes, and aen is low while this
// block is using the bus. Every byte access is: one idle clock, one clock of
// address set-up, STROBE_CYCLES clocks of strobe (read data is taken on the
// last), one clock of hold - STROBE_CYCLES+3 clocks. A 16-bit register is two
// accesses, low byte at the even address first.
//
// The bus signals (4 address, 8 data, ioRead, ioWrite, aEnable), the polling
// by the network controller, the copy into an on-FPGA buffer that destroys
// its old contents, and the length-then-data order follow the design
// description. The register map, register values, strobe timing and
// handshake are this design's choices, taken from the chip's published 8-bit
// mode rules.
module eth_if
  import netcon_pkg::*;
#(
  parameter int unsigned AW            = BUF_AW,
  parameter int unsigned STROBE_CYCLES = 3
) (
  input  logic          clk,
  input  logic          rst,
  // network controller
  input  logic          poll_req,
  output logic          poll_ack,
  output logic          pkt_avail,
  input  logic          load_req,
  output logic          load_ack,
  output logic [15:0]   pkt_len,
  output logic          init_done,
  output logic          chip_ok,
  // packet buffer write port
  output logic          buf_we,
  output logic [AW-1:0] buf_addr,
  output logic [7:0]    buf_wdata,
  // CS8900A I/O bus
  output logic [3:0]    sa,
  output logic [7:0]    data_o,
  output logic          data_oe,
  input  logic [7:0]    data_i,
  output logic          ior_n,
  output logic          iow_n,
  output logic          aen
);
  typedef enum logic [3:0] {
    S_ID_PTR, S_ID_RD, S_RXCTL_PTR, S_RXCTL_WR, S_LINE_PTR, S_LINE_WR,
    S_IDLE, S_POLL_PTR, S_POLL_RD, S_LD_STATUS, S_LD_LEN, S_LD_DATA, S_ACK
  } state_t;

  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_STROBE, P_HOLD} phase_t;

  localparam int unsigned SCW = $clog2(STROBE_CYCLES + 1);

  state_t         st;
  phase_t         ph;
  logic [SCW-1:0] scount;
  logic           bsel;        // byte of the current 16-bit register
  logic [7:0]     rbyte;       // byte read by the last access
  logic [7:0]     rlow;        // low byte of a 16-bit read
  logic [15:0]    idx;         // data byte being copied
  logic           frame_ready; // a frame has been reported, not yet loaded
  logic           ack_load;    // the pending acknowledge is for a load

  // ---- the access the current state needs ----
  logic        op_go, op_we, op_word;
  logic [3:0]  op_port;
  logic [15:0] op_val;

  always_comb begin
    op_go   = 1'b1;
    op_we   = 1'b0;
    op_word = 1'b1;
    op_port = CS_PP_PTR;
    op_val  = '0;
    unique case (st)
      S_ID_PTR:    begin op_we = 1'b1; op_val = PP_PRODUCT_ID; end
      S_ID_RD:     op_port = CS_PP_DATA;
      S_RXCTL_PTR: begin op_we = 1'b1; op_val = PP_RXCTL; end
      S_RXCTL_WR:  begin op_we = 1'b1; op_port = CS_PP_DATA; op_val = RXCTL_VALUE; end
      S_LINE_PTR:  begin op_we = 1'b1; op_val = PP_LINECTL; end
      S_LINE_WR:   begin op_we = 1'b1; op_port = CS_PP_DATA; op_val = LINECTL_VALUE; end
      S_POLL_PTR:  begin op_we = 1'b1; op_val = PP_RXEVENT; end
      S_POLL_RD:   op_port = CS_PP_DATA;
      S_LD_STATUS: op_port = CS_RXTX_DATA;
      S_LD_LEN:    op_port = CS_RXTX_DATA;
      S_LD_DATA:   begin op_port = CS_RXTX_DATA | {3'b000, idx[0]}; op_word = 1'b0; end
      default:     op_go = 1'b0;   // S_IDLE, S_ACK
    endcase
  end

  wire        acc_done  = (ph == P_HOLD);
  wire        last_byte = !op_word || bsel;       // access completes the op
  wire [15:0] rword     = {rbyte, rlow};          // valid when bsel finishes

  // ---- bus engine and sequencer ----
  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_ID_PTR;
      ph          <= P_IDLE;
      scount      <= '0;
      bsel        <= 1'b0;
      rbyte       <= '0;
      rlow        <= '0;
      idx         <= '0;
      frame_ready <= 1'b0;
      ack_load    <= 1'b0;
      poll_ack    <= 1'b0;
      load_ack    <= 1'b0;
      pkt_avail   <= 1'b0;
      pkt_len     <= '0;
      init_done   <= 1'b0;
      chip_ok     <= 1'b0;
      buf_we      <= 1'b0;
      buf_addr    <= '0;
      buf_wdata   <= '0;
      sa          <= '0;
      data_o      <= '0;
      data_oe     <= 1'b0;
      ior_n       <= 1'b1;
      iow_n       <= 1'b1;
      aen         <= 1'b1;
    end else begin
      buf_we <= 1'b0;

      // bus engine: one byte access per pass through the phases
      unique case (ph)
        P_IDLE: if (op_go) begin
          ph      <= P_SETUP;
          sa      <= op_port | {3'b000, bsel};
          data_o  <= bsel ? op_val[15:8] : op_val[7:0];
          data_oe <= op_we;
          aen     <= 1'b0;
        end
        P_SETUP: begin
          ph     <= P_STROBE;
          scount <= '0;
          ior_n  <= op_we;
          iow_n  <= !op_we;
        end
        P_STROBE: begin
          if (scount == SCW'(STROBE_CYCLES - 1)) begin
            ph    <= P_HOLD;
            rbyte <= data_i;
            ior_n <= 1'b1;
            iow_n <= 1'b1;
          end else begin
            scount <= scount + 1'b1;
          end
        end
        P_HOLD: begin
          ph      <= P_IDLE;
          data_oe <= 1'b0;
          aen     <= 1'b1;
        end
        default: ph <= P_IDLE;
      endcase

      // sequencer: moves on when an access finishes
      if (acc_done) begin
        if (!last_byte) begin
          bsel <= 1'b1;
          rlow <= rbyte;
        end else begin
          bsel <= 1'b0;
          unique case (st)
            S_ID_PTR:    st <= S_ID_RD;
            S_ID_RD:     begin chip_ok <= (rword == CS_EISA_ID); st <= S_RXCTL_PTR; end
            S_RXCTL_PTR: st <= S_RXCTL_WR;
            S_RXCTL_WR:  st <= S_LINE_PTR;
            S_LINE_PTR:  st <= S_LINE_WR;
            S_LINE_WR:   begin init_done <= 1'b1; st <= S_IDLE; end
            S_POLL_PTR:  st <= S_POLL_RD;
            S_POLL_RD: begin
              frame_ready <= rword[RXEVENT_RXOK];
              pkt_avail   <= rword[RXEVENT_RXOK];
              ack_load    <= 1'b0;
              st          <= S_ACK;
            end
            S_LD_STATUS: st <= S_LD_LEN;
            S_LD_LEN: begin
              pkt_len <= rword;
              idx     <= '0;
              if (rword == '0) begin
                frame_ready <= 1'b0;
                ack_load    <= 1'b1;
                st          <= S_ACK;
              end else begin
                st <= S_LD_DATA;
              end
            end
            S_LD_DATA: begin
              if (idx < 16'(2 ** AW)) begin
                buf_we    <= 1'b1;
                buf_addr  <= idx[AW-1:0];
                buf_wdata <= rbyte;
              end
              idx <= idx + 1'b1;
              if (idx == pkt_len - 1'b1) begin
                frame_ready <= 1'b0;
                ack_load    <= 1'b1;
                st          <= S_ACK;
              end
            end
            default: st <= S_IDLE;
          endcase
        end
      end

      // request handling while idle, acknowledge release
      if (st == S_IDLE && ph == P_IDLE) begin
        if (load_req) begin
          if (frame_ready) begin
            st <= S_LD_STATUS;
          end else begin
            pkt_len  <= '0;
            ack_load <= 1'b1;
            st       <= S_ACK;
          end
        end else if (poll_req) begin
          if (frame_ready) begin
            pkt_avail <= 1'b1;
            ack_load  <= 1'b0;
            st        <= S_ACK;
          end else begin
            st <= S_POLL_PTR;
          end
        end
      end
      if (st == S_ACK) begin
        poll_ack <= !ack_load && poll_req;
        load_ack <= ack_load && load_req;
        if (!(ack_load ? load_req : poll_req)) begin
          poll_ack <= 1'b0;
          load_ack <= 1'b0;
          st       <= S_IDLE;
        end
      end
    end
  end

  // handshake rule: an acknowledge only rises in answer to a raised request
  a_poll_ack:   assert property (@(posedge clk) disable iff (rst) $rose(poll_ack) |-> $past(poll_req));
  a_load_ack:   assert property (@(posedge clk) disable iff (rst) $rose(load_ack) |-> $past(load_req));

  // bus rules: never both strobes, address held stable through the strobe
  a_one_strobe: assert property (@(posedge clk) disable iff (rst) !(!ior_n && !iow_n));
  a_aen_low:    assert property (@(posedge clk) disable iff (rst) (!ior_n || !iow_n) |-> !aen);
  a_sa_stable:  assert property (@(posedge clk) disable iff (rst)
                                 (!ior_n || !iow_n) && $past(!ior_n || !iow_n) |-> $stable(sa));
endmodule
