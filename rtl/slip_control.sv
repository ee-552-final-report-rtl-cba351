// slip_control: the SLIP link interface (SlipControl).
//
// Wraps the SLIP unit and its packet RAM (SLIPBUFFER). Bytes arriving on
// serialin at 9600 baud are un-escaped and stored in the RAM as they arrive;
// at the END character pktRead pulses for one clock. The network controller
// then reads the packet at random: it puts a byte address on address_in and
// gets the byte on data_out one clock later, with data_valid high (low in a
// clock just after the SLIP unit wrote a byte, which has priority). The
// transmit side takes bytes with out_load and ends the packet with
// out_finished while outready is high, and sends them SLIP-encoded on
// serialout.
//
// The structure and port names follow the SlipControl block diagram; the one
// reset drives both the transmit clear (soutclr) and the receive reset, as
// described. The whole block runs on sysclock; the controller's read side
// has no clock of its own here (this design's choice), so a slower
// controller simply holds address_in for as long as it needs.
module slip_control
  import netcon_pkg::*;
#(
  parameter int unsigned CLK_HZ = 25_175_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic              sysclock,
  input  logic              reset,
  input  logic              serialin,
  output logic              serialout,
  output logic              enableserialout,
  output logic              outready,
  output logic              pktRead,
  output logic [7:0]        data_out,
  output logic              data_valid,
  input  logic [BUF_AW-1:0] address_in,
  input  logic              out_load,
  input  logic [7:0]        serial_out_data,
  input  logic              out_finished
);
  logic [7:0]        s_data;
  logic [BUF_AW-1:0] s_address;
  logic              s_write;

  slip #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_slip (
    .clock(sysclock), .reset(reset), .soutclr(reset),
    .serialin(serialin), .serialout(serialout),
    .enableserialout(enableserialout), .outready(outready),
    .data(s_data), .address(s_address), .write(s_write), .pktRead(pktRead),
    .serial_out_data(serial_out_data), .out_load(out_load),
    .out_finished(out_finished)
  );

  slip_buffer #(.AW(BUF_AW)) u_buffer (
    .clk(sysclock), .write(s_write), .address(s_address), .data(s_data),
    .ctrl_address_in(address_in), .ctrl_data_out(data_out),
    .ctrl_data_valid(data_valid)
  );
endmodule
