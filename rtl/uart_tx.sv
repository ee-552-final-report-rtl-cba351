// uart_tx: asynchronous serial transmitter (RS-232 framing, 8 data bits, no
// parity, one stop bit, least significant bit first).
//
// When ready is high, a one-cycle load pulse takes data; the transmitter then
// sends the start bit, eight data bits and the stop bit, each CLKS_PER_BIT
// system clocks long, and raises ready again when the stop bit has been
// sent. txd idles high. busy is the inverse of ready.
//
// The 9600 baud rate and the 25.175 MHz system clock follow the design
// description; the structure is this design's own.
module uart_tx #(
  parameter int unsigned CLK_HZ = 25_175_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       load,
  output logic       txd,
  output logic       ready
);
  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;   // stop bit and data bits still to send, LSB first
  logic [3:0]    left;    // bits still to send
  logic [CW-1:0] count;

  assign ready = (left == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      left  <= '0;
      count <= '0;
      txd   <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (load) begin
        frame <= {1'b1, data};
        left  <= 4'd10;
        count <= '0;
        txd   <= 1'b0;          // start bit goes out at once
      end
    end else if (count == CW'(CLKS_PER_BIT - 1)) begin
      count <= '0;
      frame <= {1'b1, frame[8:1]};
      left  <= left - 1'b1;
      txd   <= (left == 4'd1) ? 1'b1 : frame[0];
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
