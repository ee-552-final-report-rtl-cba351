// tb_net_controller: drives two network controllers, one on the Ethernet
// link (SLIP = 0) and one on the SLIP link (SLIP = 1), with tick every 4
// clocks. The testbench plays the link interfaces: for Ethernet it answers
// poll and load requests with four-phase handshakes and copies the frame
// into a buffer model when asked to load; for SLIP it writes the packet into
// a buffer model and pulses pkt_ready, and its rd_valid drops at random to
// force re-reads. Packets with the right key, a wrong key byte, a longer IP
// header, a too-short UDP length and a bad IHL are sent; the appliance state
// must toggle exactly for the good ones, with key_match and pkt_checked
// pulsing accordingly.
module tb_net_controller;
  import tb_netcon_pkg::*;
  logic clk = 1'b0, rst = 1'b1, tick = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;
  int tc = 0;
  always @(posedge clk) begin
    tc <= (tc + 1) % 4;
    tick <= (tc == 3);
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- Ethernet side ----------------
  logic e_poll, e_load, e_pack = 1'b0, e_avail = 1'b0, e_lack = 1'b0;
  logic [8:0] e_raddr;
  logic [7:0] e_rdata;
  logic e_off, e_match, e_checked;
  logic [7:0] e_mem [512];
  bytes_t e_pending;
  bit e_has = 0;
  int e_matches = 0, e_checks = 0, e_polls = 0;

  net_controller #(.SLIP(1'b0)) dut_e (
    .clk(clk), .rst(rst), .tick(tick),
    .poll_req(e_poll), .poll_ack(e_pack), .pkt_avail(e_avail),
    .load_req(e_load), .load_ack(e_lack), .pkt_ready(1'b0),
    .rd_addr(e_raddr), .rd_data(e_rdata), .rd_valid(1'b1),
    .appliance_off(e_off), .key_match(e_match), .pkt_checked(e_checked));

  always @(posedge clk) e_rdata <= e_mem[e_raddr];

  // link interface model: four-phase handshakes
  initial forever begin
    @(negedge clk);
    if (e_poll && !e_pack) begin
      repeat (3) @(negedge clk);
      e_avail = e_has; e_pack = 1'b1; e_polls++;
      while (e_poll) @(negedge clk);
      e_pack = 1'b0;
    end else if (e_load && !e_lack) begin
      foreach (e_pending[i]) e_mem[i] = e_pending[i];
      e_has = 0;
      repeat (20) @(negedge clk);
      e_lack = 1'b1;
      while (e_load) @(negedge clk);
      e_lack = 1'b0;
    end
  end

  always @(posedge clk) if (!rst && tick) begin
    if (e_match) e_matches++;
    if (e_checked) e_checks++;
  end

  // ---------------- SLIP side ----------------
  logic s_pready = 1'b0, s_valid = 1'b1;
  logic [8:0] s_raddr;
  logic [7:0] s_rdata;
  logic s_poll, s_load, s_off, s_match, s_checked;
  logic [7:0] s_mem [512];
  int s_matches = 0, s_checks = 0, s_invalid = 0;

  net_controller #(.SLIP(1'b1)) dut_s (
    .clk(clk), .rst(rst), .tick(tick),
    .poll_req(s_poll), .poll_ack(1'b0), .pkt_avail(1'b0),
    .load_req(s_load), .load_ack(1'b0), .pkt_ready(s_pready),
    .rd_addr(s_raddr), .rd_data(s_rdata), .rd_valid(s_valid),
    .appliance_off(s_off), .key_match(s_match), .pkt_checked(s_checked));

  always @(posedge clk) begin
    s_rdata <= s_mem[s_raddr];
    s_valid <= ($urandom % 4) != 0;
    if (!s_valid) s_invalid++;
  end

  always @(posedge clk) if (!rst && tick) begin
    if (s_match) s_matches++;
    if (s_checked) s_checks++;
  end

  // ---------------- stimulus ----------------
  typedef struct { bytes_t ip; bit good; string name; } case_t;

  function automatic bytes_t bad_key(int pos);
    bytes_t k = key_bytes(GOOD_KEY);
    k[pos] = k[pos] ^ 8'h20;
    return k;
  endfunction

  initial begin
    case_t cs[$];
    case_t c;
    bytes_t k, ip;
    bit exp_e, exp_s;
    int n0, m0, timeout;
    exp_e = 0; exp_s = 0;

    c.ip = make_ip_udp(key_bytes(GOOD_KEY), 5); c.good = 1; c.name = "good"; cs.push_back(c);
    c.ip = make_ip_udp(bad_key(0), 5); c.good = 0; c.name = "bad first byte"; cs.push_back(c);
    c.ip = make_ip_udp(bad_key(7), 5); c.good = 0; c.name = "bad last byte"; cs.push_back(c);
    k = key_bytes(GOOD_KEY); k.push_back(8'h55); k.push_back(8'hAA);
    c.ip = make_ip_udp(k, 7); c.good = 1; c.name = "good, IHL 7, longer payload"; cs.push_back(c);
    ip = make_ip_udp(key_bytes(GOOD_KEY), 5); ip[25] = 8'd15;   // UDP length 15
    c.ip = ip; c.good = 0; c.name = "UDP length too short"; cs.push_back(c);
    ip = make_ip_udp(key_bytes(GOOD_KEY), 5); ip[0] = 8'h44;    // IHL 4
    c.ip = ip; c.good = 0; c.name = "IHL below 5"; cs.push_back(c);
    c.ip = make_ip_udp(bad_key(3), 5); c.good = 0; c.name = "bad middle byte"; cs.push_back(c);
    c.ip = make_ip_udp(key_bytes(GOOD_KEY), 5); c.good = 1; c.name = "good again"; cs.push_back(c);

    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (200) @(negedge clk);
    check(e_polls > 3 && !e_load, "Ethernet side keeps polling while nothing arrives");
    check(!s_poll && !s_load && s_checks == 0, "SLIP side waits for pkt_ready");

    foreach (cs[j]) begin
      c = cs[j];
      // Ethernet
      n0 = e_checks; m0 = e_matches;
      e_pending = eth_wrap(c.ip); e_has = 1;
      timeout = 0;
      while (e_checks == n0 && timeout < 5000) begin @(negedge clk); timeout++; end
      repeat (8) @(negedge clk);
      if (c.good) exp_e = !exp_e;
      check(e_checks == n0 + 1, {c.name, ": Ethernet packet examined"});
      check(e_matches == m0 + (c.good ? 1 : 0), {c.name, ": Ethernet key_match"});
      check(e_off == exp_e, {c.name, ": Ethernet appliance state"});
      // SLIP
      n0 = s_checks; m0 = s_matches;
      foreach (c.ip[i]) s_mem[i] = c.ip[i];
      @(negedge clk); s_pready = 1'b1; @(negedge clk); s_pready = 1'b0;
      timeout = 0;
      while (s_checks == n0 && timeout < 5000) begin @(negedge clk); timeout++; end
      repeat (8) @(negedge clk);
      if (c.good) exp_s = !exp_s;
      check(s_checks == n0 + 1, {c.name, ": SLIP packet examined"});
      check(s_matches == m0 + (c.good ? 1 : 0), {c.name, ": SLIP key_match"});
      check(s_off == exp_s, {c.name, ": SLIP appliance state"});
    end
    check(s_invalid > 0, "rd_valid low exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
