// tb_eth_if: runs eth_if against a behavioural CS8900A.
// Checks: the chip is identified and its receiver switched on (promiscuous,
// RxOK frames accepted, SerRxON); a poll with nothing received answers "no
// packet"; a stored frame is reported, reported again until loaded, and
// loaded byte for byte into the buffer with the right length; two queued
// frames are fetched in turn; a frame longer than the buffer fills the
// buffer and is still drained from the chip; the bus never breaks the
// chip's rules. It also measures the load time of a minimum-size frame,
// which must fit in one network-controller cycle (1024 clocks).
module tb_eth_if;
  import tb_netcon_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic poll_req = 1'b0, load_req = 1'b0;
  logic poll_ack, pkt_avail, load_ack, init_done, chip_ok;
  logic [15:0] pkt_len;
  logic buf_we;
  logic [8:0] buf_addr;
  logic [7:0] buf_wdata, d_to_chip, d_from_chip;
  logic [3:0] sa;
  logic data_oe, ior_n, iow_n, aen;
  logic [7:0] bufm [512];
  int checks = 0, failures = 0, nwrites = 0;

  always #5 clk = !clk;

  eth_if dut (
    .clk(clk), .rst(rst), .poll_req(poll_req), .poll_ack(poll_ack),
    .pkt_avail(pkt_avail), .load_req(load_req), .load_ack(load_ack),
    .pkt_len(pkt_len), .init_done(init_done), .chip_ok(chip_ok),
    .buf_we(buf_we), .buf_addr(buf_addr), .buf_wdata(buf_wdata),
    .sa(sa), .data_o(d_to_chip), .data_oe(data_oe), .data_i(d_from_chip),
    .ior_n(ior_n), .iow_n(iow_n), .aen(aen));

  cs8900a_model chip (.clk(clk), .rst(rst), .sa(sa), .din(d_to_chip), .dout(d_from_chip),
                      .ior_n(ior_n), .iow_n(iow_n), .aen(aen));

  always @(posedge clk) if (!rst && buf_we) begin
    bufm[buf_addr] <= buf_wdata;
    nwrites <= nwrites + 1;
  end

  always @(posedge clk) if (!rst && !iow_n && !data_oe) begin
    failures++; $display("FAIL write strobe without driving the data bus");
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic poll(output bit avail);
    @(negedge clk); poll_req = 1'b1;
    while (!poll_ack) @(negedge clk);
    avail = pkt_avail;
    poll_req = 1'b0;
    while (poll_ack) @(negedge clk);
  endtask

  task automatic load(output int len, output int cycles);
    cycles = 0;
    @(negedge clk); load_req = 1'b1;
    while (!load_ack) begin @(negedge clk); cycles++; end
    len = int'(pkt_len);
    load_req = 1'b0;
    while (load_ack) @(negedge clk);
  endtask

  task automatic check_frame(input bytes_t f, input string name);
    bit a; int len, cyc;
    poll(a);
    check(a, {name, ": frame reported"});
    load(len, cyc);
    check(len == f.size(), $sformatf("%s: length %0d exp %0d", name, len, f.size()));
    foreach (f[i]) if (i < 512) check(bufm[i] == f[i], $sformatf("%s: byte %0d got %02x exp %02x", name, i, bufm[i], f[i]));
  endtask

  initial begin
    bytes_t f1, f2, f3, pl;
    bit a; int len, cyc, fr0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (!init_done) @(negedge clk);
    check(chip_ok, "product ID recognised");
    check(chip.rxctl[7] && chip.rxctl[8], "RxCTL: promiscuous and RxOK frames accepted");
    check(chip.linectl[6], "LineCTL: receiver on");
    poll(a);
    check(!a, "no frame: poll says none");
    load(len, cyc);
    check(len == 0, "load with no frame gives length 0");

    // one minimum-size frame with the key
    f1 = eth_wrap(make_ip_udp(key_bytes(GOOD_KEY), 5));
    while (f1.size() < 60) f1.push_back(8'h00);
    chip.push_frame(f1);
    poll(a);
    check(a, "frame reported");
    poll(a);
    check(a, "frame reported again until loaded");
    load(len, cyc);
    $display("60-byte frame loaded in %0d clocks", cyc);
    check(cyc <= 1024, $sformatf("load fits in one controller cycle (%0d clocks)", cyc));
    check(cyc >= 64 * 6, $sformatf("load takes (4+60) byte accesses of 6 clocks (%0d)", cyc));
    check(len == 60, "length 60");
    foreach (f1[i]) check(bufm[i] == f1[i], $sformatf("byte %0d got %02x exp %02x", i, bufm[i], f1[i]));
    poll(a);
    check(!a, "after loading: none");

    // two frames queued
    pl = {}; for (int i = 0; i < 30; i++) pl.push_back(8'($urandom));
    f2 = eth_wrap(make_ip_udp(pl, 6));
    pl = {}; for (int i = 0; i < 11; i++) pl.push_back(8'($urandom));
    f3 = eth_wrap(make_ip_udp(pl, 5));
    chip.push_frame(f2);
    chip.push_frame(f3);
    check_frame(f2, "queued 1");
    check_frame(f3, "queued 2");

    // longer than the buffer
    f1 = {}; for (int i = 0; i < 600; i++) f1.push_back(8'($urandom));
    fr0 = chip.frames_read;
    chip.push_frame(f1);
    check_frame(f1, "oversize");
    check(chip.frames_read == fr0 + 1, "oversize frame drained from the chip");
    poll(a);
    check(!a, "none left");
    check(chip.bus_errors == 0, $sformatf("bus errors %0d", chip.bus_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
