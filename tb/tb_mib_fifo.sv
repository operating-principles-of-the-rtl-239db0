// tb_mib_fifo - checks the 16 x 1024 Sample FIFO at its full size.
// Fills it to exactly 1024 entries (full must rise then, and further writes
// be ignored), drains it in order, then runs random simultaneous pushes and
// pops against a queue model, and checks that clr empties it.
module tb_mib_fifo;
  logic clk = 0, rst_n = 0, clr = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wdata = 0, rdata;
  logic empty, full;
  logic [10:0] count;
  logic [15:0] q [$];
  int checks = 0, failures = 0;

  mib_fifo #(.WIDTH(16), .DEPTH(1024)) dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 1024; i++) begin
      wr_en = 1; wdata = 16'(i * 7 + 3); @(negedge clk);
      if (i < 1023) check(!full, "not full early");
    end
    check(full && count == 1024, "full at 1024 entries");
    wdata = 16'hDEAD; @(negedge clk); wr_en = 0;
    check(count == 1024, "write to full FIFO ignored");
    for (int i = 0; i < 1024; i++) begin
      check(rdata == 16'(i * 7 + 3), "in-order read");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(empty, "empty after draining");
    rd_en = 1; @(negedge clk); rd_en = 0; check(empty && count == 0, "read of empty FIFO ignored");
    for (int i = 0; i < 5000; i++) begin
      logic w, r;
      w = 1'($urandom); r = 1'($urandom);
      wr_en = w; rd_en = r; wdata = 16'($urandom);
      if (r && q.size() > 0) check(rdata == q[0], "random traffic head");
      @(negedge clk);
      if (r && q.size() > 0) void'(q.pop_front());
      if (w && q.size() < 1024) q.push_back(wdata);
      check(count == q.size(), "count matches model");
    end
    wr_en = 0; rd_en = 0;
    clr = 1; @(negedge clk); clr = 0; check(empty && count == 0, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
