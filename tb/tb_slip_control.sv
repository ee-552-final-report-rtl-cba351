// tb_slip_control: sends SLIP-encoded IP/UDP packets into slip_control at 16
// clocks per bit, waits for pktRead and reads every byte back through the
// controller's random-access port (address_in -> data_out one clock later,
// data_valid high), comparing with the packet sent. It also sends one short
// packet out through the transmit side and decodes the line.
module tb_slip_control;
  import tb_netcon_pkg::*;
  localparam int BITC = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic rxd = 1'b1;
  logic txd, en_out, outready, pktRead, valid;
  logic [7:0] q;
  logic [8:0] raddr = '0;
  logic [7:0] od = '0;
  logic oload = 1'b0, ofin = 1'b0;
  int checks = 0, failures = 0, npkt = 0;

  always #5 clk = !clk;

  slip_control #(.CLK_HZ(BITC * 1000), .BAUD(1000)) dut (
    .sysclock(clk), .reset(rst), .serialin(rxd), .serialout(txd),
    .enableserialout(en_out), .outready(outready), .pktRead(pktRead),
    .data_out(q), .data_valid(valid), .address_in(raddr), .out_load(oload),
    .serial_out_data(od), .out_finished(ofin));

  always @(posedge clk) if (!rst && pktRead) npkt <= npkt + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send_byte(input logic [7:0] b);
    rxd = 1'b0; repeat (BITC) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (BITC) @(negedge clk); end
    rxd = 1'b1; repeat (BITC) @(negedge clk);
  endtask

  initial begin
    bytes_t p, e, pl;
    logic [7:0] b;
    int n0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      pl = {};
      for (int i = 0; i < 6 + 4 * k; i++) pl.push_back(i == 2 ? 8'hC0 : i == 3 ? 8'hDB : 8'($urandom));
      p = make_ip_udp(pl, 5 + k);
      e = slip_encode(p);
      n0 = npkt;
      foreach (e[i]) send_byte(e[i]);
      repeat (3) @(negedge clk);
      check(npkt == n0 + 1, "pktRead after END");
      for (int i = p.size() - 1; i >= 0; i--) begin
        raddr = 9'(i);
        @(negedge clk);
        check(valid, "data_valid while no byte arrives");
        check(q == p[i], $sformatf("pkt %0d byte %0d got %02x exp %02x", k, i, q, p[i]));
      end
    end
    // transmit one escaped byte and END, decoding the line in parallel
    e = {8'hDB, 8'hDC, 8'hC0};
    fork
      begin
        od = 8'hC0; oload = 1'b1; @(negedge clk); oload = 1'b0;
        while (!outready) @(negedge clk);
        ofin = 1'b1; @(negedge clk); ofin = 1'b0;
      end
      foreach (e[j]) begin
        while (txd) @(negedge clk);
        repeat (BITC / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (BITC) @(negedge clk); b[i] = txd; end
        repeat (BITC) @(negedge clk);
        check(b == e[j], $sformatf("tx byte %0d got %02x exp %02x", j, b, e[j]));
      end
    join
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
