// slip_buffer: the SLIPBUFFER packet RAM of the SLIP link interface.
//
// One byte-wide RAM of 2**AW locations with a single access port shared by
// the SLIP unit and the network controller. While write is high the byte on
// data is stored at address (the SLIP unit has priority). While write is low
// the byte at ctrl_address_in is read; it appears on ctrl_data_out one clock
// later with ctrl_data_valid high. In a cycle that writes, ctrl_data_valid
// goes low on the next clock and ctrl_data_out holds its last value.
//
// The write-has-priority rule, the port names and the 9-bit address follow
// the design description. A single clock for both sides (rather than separate
// SLIP and controller clocks) is this design's choice.
module slip_buffer
  import netcon_pkg::*;
#(
  parameter int unsigned AW = BUF_AW
) (
  input  logic          clk,
  input  logic          write,
  input  logic [AW-1:0] address,
  input  logic [7:0]    data,
  input  logic [AW-1:0] ctrl_address_in,
  output logic [7:0]    ctrl_data_out,
  output logic          ctrl_data_valid
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (write) begin
      mem[address]    <= data;
      ctrl_data_valid <= 1'b0;
    end else begin
      ctrl_data_out   <= mem[ctrl_address_in];
      ctrl_data_valid <= 1'b1;
    end
  end
endmodule
