// tb_clk_div: checks that clk_div gives exactly one tick every DIV clocks,
// the first one DIV clocks after reset, for DIV = 8 and for the default 1024.
module tb_clk_div;
  logic clk = 1'b0, rst = 1'b1;
  logic tick8, tick1k;
  int   checks = 0, failures = 0;

  always #5 clk = !clk;

  clk_div #(.DIV(8)) dut8 (.clk(clk), .rst(rst), .tick(tick8));
  clk_div            dut1k (.clk(clk), .rst(rst), .tick(tick1k));

  int cyc = 0, last8 = 0, last1k = 0, n8 = 0, n1k = 0;

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (tick8) begin
      checks++;
      if (cyc - last8 != 8) begin
        failures++;
        $display("FAIL DIV=8 tick spacing %0d", cyc - last8);
      end
      last8 <= cyc;
      n8 <= n8 + 1;
    end
    if (tick1k) begin
      checks++;
      if (cyc - last1k != 1024) begin
        failures++;
        $display("FAIL DIV=1024 tick spacing %0d", cyc - last1k);
      end
      last1k <= cyc;
      n1k <= n1k + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // tick is registered: the first one is seen DIV clocks after reset falls
    @(posedge clk);
    last8 = 0; last1k = 0;
    repeat (5000) @(posedge clk);
    checks++;
    if (n8 < 600 || n1k < 4) begin
      failures++;
      $display("FAIL too few ticks: %0d %0d", n8, n1k);
    end
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
