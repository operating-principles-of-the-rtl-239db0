// tb_mib_clkgen - checks the 20/10 MHz enables and the reset synchroniser.
// ce20 must be high on every second clock and ce10 on every fourth, ce10
// only together with ce20, and neither during reset; rst_n must rise two
// clocks after SYSRESET* is released.
module tb_mib_clkgen;
  logic clk = 0, sysreset_n = 0;
  logic rst_n, ce20, ce10;
  int checks = 0, failures = 0;
  int n20, n10, cyc, last20, last10;

  mib_clkgen dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(!rst_n && !ce20 && !ce10, "outputs quiet in reset");
    @(negedge clk) sysreset_n = 1;
    @(posedge clk); #1 check(!rst_n, "rst_n still low after 1 clock");
    @(posedge clk); #1 check(rst_n, "rst_n high after 2 clocks");
    n20 = 0; n10 = 0; last20 = -1; last10 = -1;
    for (cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      if (ce10) check(ce20, "ce10 only with ce20");
      if (ce20) begin
        if (last20 >= 0) check(cyc - last20 == 2, "ce20 period 2");
        last20 = cyc; n20++;
      end
      if (ce10) begin
        if (last10 >= 0) check(cyc - last10 == 4, "ce10 period 4");
        last10 = cyc; n10++;
      end
    end
    check(n20 == 200, "200 ce20 pulses in 400 clocks");
    check(n10 == 100, "100 ce10 pulses in 400 clocks");
    // asynchronous assertion
    #3 sysreset_n = 0; #1 check(!rst_n, "asynchronous reset assertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
