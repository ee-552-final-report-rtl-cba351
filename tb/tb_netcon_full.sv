// tb_netcon_full: one complete operation of the appliance controller with
// every parameter at its default (Ethernet link, 25.175 MHz clock, network
// controller at 1/1024 of it, 512-byte packet buffer, 8-byte key).
//
// A behavioural CS8900A receives four frames: a UDP packet with a wrong
// key, one with the right key, one with the right key behind a longer IP
// header, and a full-size 1514-byte frame with the right key, longer than
// the packet buffer. The appliance pin must stay high (appliance running)
// for the first, go low (appliance off) after the second, return high after
// the third and go low again after the fourth. Every byte the controller
// compares must have come through the chip interface and the packet buffer.
module tb_netcon_full;
  import tb_netcon_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  always #20 clk = !clk;

  logic [3:0] sa;
  logic [7:0] d_o, d_i;
  logic oe, ior_n, iow_n, aen;
  logic relay_n, chip_ok, init_done, off, match, checked;
  logic [15:0] plen;
  logic sout, en, ordy;

  netcon_top dut (
    .clk(clk), .rst(rst),
    .eth_sa(sa), .eth_data_o(d_o), .eth_data_oe(oe), .eth_data_i(d_i),
    .eth_ior_n(ior_n), .eth_iow_n(iow_n), .eth_aen(aen),
    .serialin(1'b1), .serialout(sout), .enableserialout(en), .outready(ordy),
    .out_load(1'b0), .serial_out_data(8'h00), .out_finished(1'b0),
    .reset_relay_n(relay_n), .chip_ok(chip_ok), .eth_pkt_len(plen),
    .init_done(init_done), .appliance_off(off), .key_match(match),
    .pkt_checked(checked));

  cs8900a_model chip (.clk(clk), .rst(rst), .sa(sa), .din(d_o), .dout(d_i),
                      .ior_n(ior_n), .iow_n(iow_n), .aen(aen));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run_frame(input bytes_t f, input bit exp_relay, input string name);
    int t = 0;
    chip.push_frame(f);
    while (!checked && t < 200000) begin @(negedge clk); t++; end
    check(t < 200000, {name, ": examined"});
    repeat (1100) @(negedge clk);
    check(relay_n == exp_relay, {name, ": appliance pin"});
    check(plen == 16'(f.size()), {name, ": frame length"});
  endtask

  initial begin
    bytes_t k;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    while (!init_done) @(negedge clk);
    check(chip_ok, "chip identified");
    check(relay_n == 1'b1, "appliance running after reset");
    k = key_bytes(GOOD_KEY); k[2] = 8'h62;
    run_frame(eth_wrap(make_ip_udp(k, 5)), 1'b1, "wrong key");
    run_frame(eth_wrap(make_ip_udp(key_bytes(GOOD_KEY), 5)), 1'b0, "right key");
    run_frame(eth_wrap(make_ip_udp(key_bytes(GOOD_KEY), 8)), 1'b1, "right key, IHL 8");
    // a full-size 1514-byte frame: only its first 512 bytes fit the buffer,
    // which still holds the key
    k = key_bytes(GOOD_KEY);
    for (int i = 0; i < 1514 - 14 - 20 - 8 - 8; i++) k.push_back(8'($urandom));
    run_frame(eth_wrap(make_ip_udp(k, 5)), 1'b0, "full-size frame, right key");
    check(chip.bus_errors == 0, "no bus errors");
    check(chip.frames_read == 4, "all frames fetched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
