// tb_uart_tx: sends bytes through uart_tx and decodes the line in the
// testbench by sampling the middle of each bit. One instance runs at 16
// clocks per bit with random bytes; one runs at the default 25.175 MHz /
// 9600 baud, where the start bit must last 2622 clocks.
module tb_uart_tx;
  localparam int FAST_BIT = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] d_f, d_s;
  logic load_f = 1'b0, load_s = 1'b0;
  logic txd_f, txd_s, rdy_f, rdy_s;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  uart_tx #(.CLK_HZ(FAST_BIT * 1000), .BAUD(1000)) dut_f (
    .clk(clk), .rst(rst), .data(d_f), .load(load_f), .txd(txd_f), .ready(rdy_f));
  uart_tx dut_s (
    .clk(clk), .rst(rst), .data(d_s), .load(load_s), .txd(txd_s), .ready(rdy_s));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // decode one frame from txd_f, starting at the clock after load
  task automatic rx_fast(output logic [7:0] b, output bit stop_ok);
    repeat (FAST_BIT / 2) @(posedge clk);
    check(txd_f == 1'b0, "start bit low");
    for (int i = 0; i < 8; i++) begin
      repeat (FAST_BIT) @(posedge clk);
      b[i] = txd_f;
    end
    repeat (FAST_BIT) @(posedge clk);
    stop_ok = txd_f;
  endtask

  initial begin
    logic [7:0] b, exp;
    bit stop_ok;
    int t0, n;
    d_f = '0; d_s = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(txd_f == 1'b1 && rdy_f, "idle high and ready");
    for (int k = 0; k < 20; k++) begin
      wait (rdy_f);
      @(negedge clk);
      exp = 8'($urandom);
      d_f = exp; load_f = 1'b1;
      @(negedge clk);
      load_f = 1'b0;
      check(!rdy_f, "busy after load");
      rx_fast(b, stop_ok);
      check(b == exp, $sformatf("byte %0d got %02x exp %02x", k, b, exp));
      check(stop_ok, "stop bit high");
    end
    // default rate: measure the start bit length
    @(negedge clk);
    d_s = 8'h01; load_s = 1'b1;
    @(negedge clk);
    load_s = 1'b0;
    n = 0;
    while (txd_s == 1'b0) begin @(negedge clk); n++; end
    check(n >= 2621 && n <= 2623, $sformatf("9600 baud start bit %0d clocks", n));
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
