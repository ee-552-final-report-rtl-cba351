// clk_div: rate divider for the network controller.
//
// The Ethernet interface runs 1024 times faster than the network controller.
// Rather than making a second clock, this divider produces a one-cycle
// enable pulse, tick, once every DIV cycles of the system clock; the
// network controller advances only on cycles where tick is high. The ratio
// 1024 follows the design description; using an enable instead of a divided
// clock is this design's choice (it keeps the whole design in one clock
// domain).
//
// Timing: after reset the first tick comes DIV cycles later, then every DIV
// cycles. tick is registered.
module clk_div #(
  parameter int unsigned DIV = 1024
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIV - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("clk_div: DIV must be at least 2");
endmodule
