// tb_appliance_controller: checks that the appliance pin is high (appliance
// running) from reset and is the inverse of disable_req one clock later.
module tb_appliance_controller;
  logic clk = 1'b0, rst = 1'b1, dis = 1'b1;
  logic pin;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  appliance_controller dut (.clk(clk), .rst(rst), .disable_req(dis), .reset_relay_n(pin));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic prev;
    @(negedge clk);
    check(pin == 1'b1, "pin high (appliance running) in reset");
    rst = 1'b0;
    @(negedge clk);
    check(pin == 1'b0, "disable_req high drives the pin low");
    for (int k = 0; k < 50; k++) begin
      prev = dis;
      dis = 1'($urandom);
      #1 check(pin == !prev, "pin unchanged before the clock edge");
      @(negedge clk);
      check(pin == !dis, "pin = !disable_req after the clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
