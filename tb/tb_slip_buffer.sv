// tb_slip_buffer: writes random bytes into slip_buffer through the SLIP-side
// port and reads them back through the controller-side port, checking the
// one-clock read latency, data_valid, and that a write takes priority over a
// read in the same clock.
module tb_slip_buffer;
  logic clk = 1'b0;
  logic write = 1'b0;
  logic [8:0] address = '0, caddr = '0;
  logic [7:0] data = '0, q;
  logic valid;
  logic [7:0] ref_mem [512];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  slip_buffer dut (.clk(clk), .write(write), .address(address), .data(data),
                   .ctrl_address_in(caddr), .ctrl_data_out(q), .ctrl_data_valid(valid));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [7:0] held;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      write = 1'b1; address = 9'(i); data = 8'($urandom); ref_mem[i] = data;
    end
    @(negedge clk); write = 1'b0;
    for (int k = 0; k < 300; k++) begin
      caddr = 9'($urandom);
      @(negedge clk);
      check(valid, "valid when not writing");
      check(q == ref_mem[caddr], $sformatf("read %0d got %02x exp %02x", caddr, q, ref_mem[caddr]));
    end
    // write wins: a read address in a write cycle gives no valid data
    held = q;
    write = 1'b1; address = 9'd7; data = 8'h3C; ref_mem[7] = 8'h3C; caddr = 9'd100;
    @(negedge clk);
    check(!valid, "no valid in a write cycle");
    check(q == held, "output held during write");
    write = 1'b0; caddr = 9'd7;
    @(negedge clk);
    check(valid && q == 8'h3C, "written byte reads back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
