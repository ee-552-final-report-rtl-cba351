// pkt_buffer: packet RAM between the Ethernet interface and the network
// controller.
//
// A byte-wide RAM of 2**AW locations with one write port, filled by the
// Ethernet interface as it copies a frame out of the Ethernet chip, and one
// read port that the network controller addresses at random. A read returns
// the byte at rd_addr one clock later (synchronous read, as in FPGA block
// RAM). A read of the location being written in the same cycle returns the
// old byte.
//
// That the buffer is on the FPGA and read at random follows the design
// description; the 512-byte size (9 address bits, the same as the SLIP
// buffer so the two link interfaces are interchangeable) is this design's
// choice.
module pkt_buffer
  import netcon_pkg::*;
#(
  parameter int unsigned AW = BUF_AW
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);
  logic [7:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
