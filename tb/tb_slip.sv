// tb_slip: end-to-end check of the SLIP unit at 16 clocks per bit.
// Receive: SLIP-encoded packets (with END and ESC bytes inside) are sent on
// serialin; every buffer write is captured and, at each pktRead pulse, the
// captured packet must equal the original, stored from address 0. An END on
// its own must not pulse pktRead, and a 520-byte packet must stop at the
// buffer's last address. Transmit: bytes are offered with out_load and the
// packet closed with out_finished; the serial line is decoded here and must
// equal the SLIP encoding worked out by the testbench.
module tb_slip;
  import tb_netcon_pkg::*;
  localparam int BITC = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic rxd = 1'b1;
  logic txd, en_out, outready;
  logic [7:0] wdata;
  logic [8:0] waddr;
  logic write, pktRead;
  logic [7:0] od = '0;
  logic oload = 1'b0, ofin = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  slip #(.CLK_HZ(BITC * 1000), .BAUD(1000)) dut (
    .clock(clk), .reset(rst), .soutclr(rst), .serialin(rxd), .serialout(txd),
    .enableserialout(en_out), .outready(outready), .data(wdata), .address(waddr),
    .write(write), .pktRead(pktRead), .serial_out_data(od), .out_load(oload),
    .out_finished(ofin));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // capture of the receive side
  logic [7:0] cap [512];
  int max_addr = -1, npkt = 0, nwr = 0;
  always @(posedge clk) if (!rst) begin
    if (write) begin
      cap[waddr] <= wdata;
      nwr <= nwr + 1;
      if (int'(waddr) > max_addr) max_addr <= int'(waddr);
    end
    if (pktRead) npkt <= npkt + 1;
  end

  task automatic send_byte(input logic [7:0] b);
    rxd = 1'b0; repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BITC) @(negedge clk); end
    rxd = 1'b1; repeat (BITC) @(negedge clk);
  endtask

  task automatic rx_packet(input bytes_t p, input string name);
    bytes_t e = slip_encode(p);
    int n0 = npkt;
    max_addr = -1;
    foreach (e[i]) send_byte(e[i]);
    repeat (4) @(negedge clk);
    check(npkt == n0 + 1, {name, ": one pktRead"});
    check(max_addr == p.size() - 1, $sformatf("%s: last address %0d exp %0d", name, max_addr, p.size() - 1));
    foreach (p[i]) if (i < 512) check(cap[i] == p[i], $sformatf("%s: byte %0d got %02x exp %02x", name, i, cap[i], p[i]));
  endtask

  // transmit decoder
  bytes_t txq;
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (!rst && txd == 1'b0) begin
        repeat (BITC / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (BITC) @(negedge clk); b[i] = txd; end
        repeat (BITC) @(negedge clk);
        if (txd !== 1'b1) begin failures++; $display("FAIL tx stop bit"); end
        txq.push_back(b);
      end
    end
  end

  initial begin
    bytes_t p, e;
    int n0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    // packet with the special characters inside
    p = {8'h45, 8'hC0, 8'h01, 8'hDB, 8'hDC, 8'hDD, 8'hC0, 8'hDB, 8'h7E};
    rx_packet(p, "escapes");
    // an END alone
    n0 = npkt;
    send_byte(8'hC0);
    repeat (4) @(negedge clk);
    check(npkt == n0, "END alone gives no pktRead");
    // random packet
    p = {};
    for (int i = 0; i < 40; i++) p.push_back(8'($urandom));
    rx_packet(p, "random");
    // an IP/UDP packet with the key
    rx_packet(make_ip_udp(key_bytes(GOOD_KEY), 5), "ip");
    // oversize packet: keeps the first 512 bytes
    p = {};
    for (int i = 0; i < 520; i++) p.push_back(8'(i * 7 + 1) == 8'hC0 ? 8'h00 : 8'(i * 7 + 1));
    e = slip_encode(p);
    max_addr = -1; n0 = npkt;
    foreach (e[i]) send_byte(e[i]);
    repeat (4) @(negedge clk);
    check(npkt == n0 + 1, "oversize: pktRead");
    check(max_addr == 511, $sformatf("oversize: last address %0d", max_addr));
    check(cap[511] == p[511] && cap[0] == p[0], "oversize: first 512 bytes kept");

    // transmit
    p = {8'h11, 8'hC0, 8'h22, 8'hDB, 8'h33};
    e = slip_encode(p);
    check(!en_out, "serial output disabled while idle");
    foreach (p[i]) begin
      while (!outready) @(negedge clk);
      od = p[i]; oload = 1'b1;
      @(negedge clk);
      oload = 1'b0;
      check(en_out, "serial output enabled in a packet");
    end
    while (!outready) @(negedge clk);
    ofin = 1'b1;
    @(negedge clk);
    ofin = 1'b0;
    while (en_out) @(negedge clk);
    repeat (2 * BITC) @(negedge clk);
    check(txq.size() == e.size(), $sformatf("tx length %0d exp %0d", txq.size(), e.size()));
    foreach (e[i]) if (i < txq.size()) check(txq[i] == e[i], $sformatf("tx byte %0d got %02x exp %02x", i, txq[i], e[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
