// tb_netcon_top: end-to-end test of the appliance controller, both links,
// at the design's real rates (25.175 MHz clock, controller at 1/1024,
// 9600 baud).
//
// u_eth is built for the Ethernet link and talks to a behavioural CS8900A;
// u_slip is built for the SLIP link and gets SLIP-encoded packets on its
// serial input. Each gets a packet with a wrong key (ignored), one with the
// right key (appliance pin goes low: appliance off) and a second right one
// (pin high again). The SLIP packets carry END and ESC bytes after the key
// so that escaping is exercised. The SLIP transmit side sends one escaped
// byte, decoded here. Each mechanism is counted and must happen at least
// once: an empty poll, a frame reported, a frame loaded, a packet rejected,
// a key match in each direction, a SLIP escape received, a SLIP packet end,
// and a SLIP byte transmitted.
module tb_netcon_top;
  import tb_netcon_pkg::*;
  localparam int BITC = 2622;   // 25.175 MHz / 9600 baud
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #20 clk = !clk;        // ~25 MHz

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- Ethernet-built top ----------------
  logic [3:0] e_sa;
  logic [7:0] e_do, e_di;
  logic e_oe, e_ior, e_iow, e_aen;
  logic e_relay, e_chip_ok, e_init, e_off, e_match, e_checked;
  logic [15:0] e_len;
  logic e_sout, e_en, e_ordy;

  netcon_top u_eth (
    .clk(clk), .rst(rst),
    .eth_sa(e_sa), .eth_data_o(e_do), .eth_data_oe(e_oe), .eth_data_i(e_di),
    .eth_ior_n(e_ior), .eth_iow_n(e_iow), .eth_aen(e_aen),
    .serialin(1'b1), .serialout(e_sout), .enableserialout(e_en), .outready(e_ordy),
    .out_load(1'b0), .serial_out_data(8'h00), .out_finished(1'b0),
    .reset_relay_n(e_relay), .chip_ok(e_chip_ok), .eth_pkt_len(e_len),
    .init_done(e_init), .appliance_off(e_off), .key_match(e_match),
    .pkt_checked(e_checked));

  cs8900a_model chip (.clk(clk), .rst(rst), .sa(e_sa), .din(e_do), .dout(e_di),
                      .ior_n(e_ior), .iow_n(e_iow), .aen(e_aen));

  // ---------------- SLIP-built top ----------------
  logic s_rxd = 1'b1;
  logic [3:0] s_sa;
  logic [7:0] s_do;
  logic s_oe, s_ior, s_iow, s_aen;
  logic s_relay, s_chip_ok, s_init, s_off, s_match, s_checked;
  logic [15:0] s_len;
  logic s_sout, s_en, s_ordy;
  logic s_load = 1'b0, s_fin = 1'b0;
  logic [7:0] s_od = '0;

  netcon_top #(.SLIP_LINK(1'b1)) u_slip (
    .clk(clk), .rst(rst),
    .eth_sa(s_sa), .eth_data_o(s_do), .eth_data_oe(s_oe), .eth_data_i(8'h00),
    .eth_ior_n(s_ior), .eth_iow_n(s_iow), .eth_aen(s_aen),
    .serialin(s_rxd), .serialout(s_sout), .enableserialout(s_en), .outready(s_ordy),
    .out_load(s_load), .serial_out_data(s_od), .out_finished(s_fin),
    .reset_relay_n(s_relay), .chip_ok(s_chip_ok), .eth_pkt_len(s_len),
    .init_done(s_init), .appliance_off(s_off), .key_match(s_match),
    .pkt_checked(s_checked));

  // ---------------- mechanism counters ----------------
  int n_empty_poll = 0, n_reported = 0, n_loaded = 0, n_rejected = 0;
  int n_match_off = 0, n_match_on = 0, n_slip_esc = 0, n_slip_end = 0, n_slip_tx = 0;

  always @(posedge clk) if (!rst) begin
    if (u_eth.poll_ack && !$past(u_eth.poll_ack)) begin
      if (u_eth.pkt_avail) n_reported++; else n_empty_poll++;
    end
    if (u_eth.load_ack && !$past(u_eth.load_ack)) n_loaded++;
    if ((u_eth.pkt_checked && !u_eth.key_match && u_eth.tick) ||
        (u_slip.pkt_checked && !u_slip.key_match && u_slip.tick)) n_rejected++;
    if (u_eth.tick && u_eth.key_match) begin if (u_eth.appliance_off) n_match_off++; else n_match_on++; end
    if (u_slip.tick && u_slip.key_match) begin if (u_slip.appliance_off) n_match_off++; else n_match_on++; end
    if (u_slip.u_slip.u_slip.rx_valid && u_slip.u_slip.u_slip.rx_byte == 8'hDB) n_slip_esc++;
    if (u_slip.u_slip.pktRead) n_slip_end++;
  end

  task automatic send_byte(input logic [7:0] b);
    s_rxd = 1'b0; repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin s_rxd = b[i]; repeat (BITC) @(negedge clk); end
    s_rxd = 1'b1; repeat (BITC) @(negedge clk);
  endtask

  task automatic wait_checked(input bit slip_side, input int n0);
    int t = 0;
    if (slip_side) while (u_slip.u_net.pkt_checked == 1'b0 && t < 200000) begin @(negedge clk); t++; end
    else           while (u_eth.u_net.pkt_checked == 1'b0 && t < 200000) begin @(negedge clk); t++; end
    repeat (1100) @(negedge clk);
    check(t < 200000, "packet examined in time");
  endtask

  bytes_t bad_k, good_k;

  // Ethernet thread
  task automatic eth_run();
    bytes_t f;
    while (!e_init) @(negedge clk);
    check(e_chip_ok, "Ethernet chip identified");
    check(e_relay == 1'b1, "Ethernet top: appliance running after reset");
    repeat (5000) @(negedge clk);
    f = eth_wrap(make_ip_udp(bad_k, 5));
    chip.push_frame(f);
    wait_checked(0, 0);
    check(e_relay == 1'b1 && !e_off, "Ethernet: wrong key ignored");
    check(e_len == 16'(f.size()), "Ethernet: frame length reported");
    f = eth_wrap(make_ip_udp(good_k, 5));
    chip.push_frame(f);
    wait_checked(0, 0);
    check(e_relay == 1'b0 && e_off, "Ethernet: right key turns the appliance off");
    f = eth_wrap(make_ip_udp(good_k, 6));
    chip.push_frame(f);
    wait_checked(0, 0);
    check(e_relay == 1'b1 && !e_off, "Ethernet: right key again turns it back on");
    check(chip.bus_errors == 0, "Ethernet: no bus errors");
  endtask

  // SLIP thread
  task automatic slip_run();
    bytes_t p, e;
    repeat (100) @(negedge clk);
    check(s_relay == 1'b1, "SLIP top: appliance running after reset");
    p = bad_k; p.push_back(8'hC0);
    e = slip_encode(make_ip_udp(p, 5));
    foreach (e[i]) send_byte(e[i]);
    wait_checked(1, 0);
    check(s_relay == 1'b1 && !s_off, "SLIP: wrong key ignored");
    p = good_k; p.push_back(8'hC0); p.push_back(8'hDB);
    e = slip_encode(make_ip_udp(p, 5));
    foreach (e[i]) send_byte(e[i]);
    wait_checked(1, 0);
    check(s_relay == 1'b0 && s_off, "SLIP: right key turns the appliance off");
    e = slip_encode(make_ip_udp(good_k, 5));
    foreach (e[i]) send_byte(e[i]);
    wait_checked(1, 0);
    check(s_relay == 1'b1 && !s_off, "SLIP: right key again turns it back on");
  endtask

  // SLIP transmit: one END byte goes out as ESC ESC_END
  task automatic slip_tx();
    logic [7:0] b;
    bytes_t exp_q, got;
    exp_q = {8'hDB, 8'hDC};
    fork
      begin
        while (!s_ordy) @(negedge clk);
        s_od = 8'hC0; s_load = 1'b1; @(negedge clk); s_load = 1'b0;
      end
      repeat (2) begin
        while (s_sout) @(negedge clk);
        repeat (BITC / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (BITC) @(negedge clk); b[i] = s_sout; end
        repeat (BITC) @(negedge clk);
        got.push_back(b);
        n_slip_tx++;
      end
    join
    check(got.size() == 2 && got[0] == exp_q[0] && got[1] == exp_q[1], "SLIP transmit escapes END");
  endtask

  initial begin
    bad_k = key_bytes(GOOD_KEY); bad_k[4] = 8'h00;
    good_k = key_bytes(GOOD_KEY);
    repeat (5) @(negedge clk);
    rst = 1'b0;
    fork
      eth_run();
      slip_run();
    join
    slip_tx();
    $display("mechanisms: empty polls %0d, frames reported %0d, loaded %0d, rejected %0d, off %0d, on %0d, SLIP escapes %0d, SLIP packet ends %0d, SLIP bytes sent %0d",
             n_empty_poll, n_reported, n_loaded, n_rejected, n_match_off, n_match_on, n_slip_esc, n_slip_end, n_slip_tx);
    check(n_empty_poll > 0, "empty poll happened");
    check(n_reported >= 3, "frames reported");
    check(n_loaded >= 3, "frames loaded");
    check(n_rejected >= 2, "packets rejected on both links");
    check(n_match_off >= 2 && n_match_on >= 2, "key matches in both directions on both links");
    check(n_slip_esc > 0, "SLIP escape received");
    check(n_slip_end >= 3, "SLIP packet ends");
    check(n_slip_tx == 2, "SLIP bytes transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
