// netcon_top: the networked appliance controller.
//
// A packet-filtering controller that switches one appliance (a computer's
// power, through an optical coupler and a relay) when a UDP packet carrying
// a secret key arrives. Two link interfaces deliver packets: eth_if copies
// frames out of a CS8900A Ethernet controller into pkt_buffer, and
// slip_control receives SLIP over a 9600-baud serial line into its own
// buffer. The network controller does not care which: SLIP_LINK (a
// build-time choice, like recompiling with the other interface) selects the
// link whose packets it examines; both interfaces are always present. The
// network controller runs 1024 times slower than the rest (clk_div enable)
// and drives appliance_controller, whose active-low pin is the only output
// to the appliance.
//
// Ports: clk is the 25.175 MHz board clock and rst a synchronous active-high
// reset. eth_* is the CS8900A 8-bit I/O bus with the data bus split into
// in, out and output enable (the three-state pad is outside). The serial and
// transmit-request ports are those of the SLIP interface; nothing inside
// sends packets, so out_load, serial_out_data and out_finished come from
// outside. reset_relay_n is the appliance pin (low = appliance off).
// chip_ok, init_done, eth_pkt_len (length of the last Ethernet frame
// loaded), appliance_off, key_match and pkt_checked are status.
//
// The block structure follows the design description's system diagram; the
// mux that picks one link and the status outputs are this design's choice.
module netcon_top
  import netcon_pkg::*;
#(
  parameter bit                   SLIP_LINK     = 1'b0,
  parameter int unsigned          DIV           = 1024,
  parameter int unsigned          CLK_HZ        = 25_175_000,
  parameter int unsigned          BAUD          = 9600,
  parameter int unsigned          STROBE_CYCLES = 3,
  parameter int unsigned          KEY_LEN       = 8,
  parameter logic [8*KEY_LEN-1:0] KEY           = "REBOOTPC"
) (
  input  logic       clk,
  input  logic       rst,
  // CS8900A bus
  output logic [3:0] eth_sa,
  output logic [7:0] eth_data_o,
  output logic       eth_data_oe,
  input  logic [7:0] eth_data_i,
  output logic       eth_ior_n,
  output logic       eth_iow_n,
  output logic       eth_aen,
  // serial line
  input  logic       serialin,
  output logic       serialout,
  output logic       enableserialout,
  output logic       outready,
  input  logic       out_load,
  input  logic [7:0] serial_out_data,
  input  logic       out_finished,
  // appliance
  output logic       reset_relay_n,
  // status
  output logic       chip_ok,
  output logic [15:0] eth_pkt_len,
  output logic       init_done,
  output logic       appliance_off,
  output logic       key_match,
  output logic       pkt_checked
);
  logic              tick;
  logic              poll_req, poll_ack, pkt_avail, load_req, load_ack;
  logic              buf_we;
  logic [BUF_AW-1:0] buf_waddr, rd_addr;
  logic [7:0]        buf_wdata, eth_rd_data, slip_rd_data, rd_data;
  logic              slip_valid, slip_pkt, rd_valid;

  clk_div #(.DIV(DIV)) u_div (.clk(clk), .rst(rst), .tick(tick));

  eth_if #(.AW(BUF_AW), .STROBE_CYCLES(STROBE_CYCLES)) u_eth (
    .clk(clk), .rst(rst),
    .poll_req(poll_req), .poll_ack(poll_ack), .pkt_avail(pkt_avail),
    .load_req(load_req), .load_ack(load_ack), .pkt_len(eth_pkt_len),
    .init_done(init_done), .chip_ok(chip_ok),
    .buf_we(buf_we), .buf_addr(buf_waddr), .buf_wdata(buf_wdata),
    .sa(eth_sa), .data_o(eth_data_o), .data_oe(eth_data_oe),
    .data_i(eth_data_i), .ior_n(eth_ior_n), .iow_n(eth_iow_n), .aen(eth_aen)
  );

  pkt_buffer #(.AW(BUF_AW)) u_pkt (
    .clk(clk), .wr_en(buf_we), .wr_addr(buf_waddr), .wr_data(buf_wdata),
    .rd_addr(rd_addr), .rd_data(eth_rd_data)
  );

  slip_control #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_slip (
    .sysclock(clk), .reset(rst), .serialin(serialin), .serialout(serialout),
    .enableserialout(enableserialout), .outready(outready),
    .pktRead(slip_pkt), .data_out(slip_rd_data), .data_valid(slip_valid),
    .address_in(rd_addr), .out_load(out_load),
    .serial_out_data(serial_out_data), .out_finished(out_finished)
  );

  assign rd_data  = SLIP_LINK ? slip_rd_data : eth_rd_data;
  assign rd_valid = SLIP_LINK ? slip_valid   : 1'b1;

  net_controller #(.SLIP(SLIP_LINK), .KEY_LEN(KEY_LEN), .KEY(KEY), .AW(BUF_AW)) u_net (
    .clk(clk), .rst(rst), .tick(tick),
    .poll_req(poll_req), .poll_ack(poll_ack), .pkt_avail(pkt_avail),
    .load_req(load_req), .load_ack(load_ack),
    .pkt_ready(slip_pkt),
    .rd_addr(rd_addr), .rd_data(rd_data), .rd_valid(rd_valid),
    .appliance_off(appliance_off), .key_match(key_match),
    .pkt_checked(pkt_checked)
  );

  appliance_controller u_app (
    .clk(clk), .rst(rst), .disable_req(appliance_off),
    .reset_relay_n(reset_relay_n)
  );
endmodule
