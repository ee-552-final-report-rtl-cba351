// tb_uart_rx: drives serial frames into uart_rx and compares the received
// bytes with those sent. A fast instance (16 clocks per bit) gets random
// bytes, a frame with a bad stop bit (must raise frame_err, not valid) and a
// short glitch (must be ignored); a default-rate instance (25.175 MHz, 9600
// baud) gets one byte.
module tb_uart_rx;
  localparam int FAST_BIT = 16;
  localparam int SLOW_BIT = 2622;
  logic clk = 1'b0, rst = 1'b1;
  logic rxd_f = 1'b1, rxd_s = 1'b1;
  logic [7:0] q_f, q_s;
  logic v_f, v_s, fe_f, fe_s;
  int checks = 0, failures = 0;
  int nvalid = 0, nferr = 0;
  logic [7:0] last_f, last_s;
  int nvalid_s = 0;

  always #5 clk = !clk;

  uart_rx #(.CLK_HZ(FAST_BIT * 1000), .BAUD(1000)) dut_f (
    .clk(clk), .rst(rst), .rxd(rxd_f), .data(q_f), .valid(v_f), .frame_err(fe_f));
  uart_rx dut_s (
    .clk(clk), .rst(rst), .rxd(rxd_s), .data(q_s), .valid(v_s), .frame_err(fe_s));

  always @(posedge clk) if (!rst) begin
    if (v_f) begin nvalid++; last_f = q_f; end
    if (fe_f) nferr++;
    if (v_s) begin nvalid_s++; last_s = q_s; end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send_f(input logic [7:0] b, input bit stop);
    rxd_f = 1'b0; repeat (FAST_BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd_f = b[i]; repeat (FAST_BIT) @(negedge clk); end
    rxd_f = stop; repeat (FAST_BIT) @(negedge clk);
    rxd_f = 1'b1; repeat (FAST_BIT) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int nv;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      b = 8'($urandom);
      nv = nvalid;
      send_f(b, 1'b1);
      check(nvalid == nv + 1, "one valid per frame");
      check(last_f == b, $sformatf("byte %0d got %02x exp %02x", k, last_f, b));
    end
    nv = nvalid;
    send_f(8'h55, 1'b0);
    repeat (2 * FAST_BIT) @(negedge clk);
    check(nvalid == nv && nferr == 1, "bad stop bit gives frame_err only");
    // glitch shorter than half a bit
    rxd_f = 1'b0; repeat (3) @(negedge clk); rxd_f = 1'b1;
    repeat (20 * FAST_BIT) @(negedge clk);
    check(nvalid == nv && nferr == 1, "glitch ignored");
    // default rate
    b = 8'hA7;
    rxd_s = 1'b0; repeat (SLOW_BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd_s = b[i]; repeat (SLOW_BIT) @(negedge clk); end
    rxd_s = 1'b1; repeat (SLOW_BIT) @(negedge clk);
    check(nvalid_s == 1 && last_s == b, $sformatf("9600 baud byte n=%0d got %02x", nvalid_s, last_s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
