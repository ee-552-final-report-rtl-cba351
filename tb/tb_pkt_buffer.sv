// tb_pkt_buffer: fills pkt_buffer through its write port and reads it back
// at random addresses through the read port, checking the one-clock read
// latency and that a read of the location being written returns the old
// byte.
module tb_pkt_buffer;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, q;
  logic [7:0] ref_mem [512];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  pkt_buffer dut (.clk(clk), .wr_en(we), .wr_addr(waddr), .wr_data(wdata),
                  .rd_addr(raddr), .rd_data(q));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i); wdata = 8'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int k = 0; k < 300; k++) begin
      raddr = 9'($urandom);
      @(negedge clk);
      check(q == ref_mem[raddr], $sformatf("read %0d got %02x exp %02x", raddr, q, ref_mem[raddr]));
    end
    // simultaneous write and read of one location: old data, then new
    raddr = 9'd33; we = 1'b1; waddr = 9'd33; wdata = ~ref_mem[33];
    @(negedge clk);
    we = 1'b0;
    check(q == ref_mem[33], "read during write returns old byte");
    ref_mem[33] = ~ref_mem[33];
    @(negedge clk);
    check(q == ref_mem[33], "new byte next clock");
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
