// tb_mib_local_mem - checks the 16 MB, four-bank local memory at full size.
// Writes words at random addresses spread over all four banks (and the
// first and last word of each bank), reads them back with one clock of
// latency, and checks that rdata holds between reads and is not disturbed
// by writes.
module tb_mib_local_mem;
  logic clk = 0, en = 0, we = 0;
  logic [21:0] addr = 0; logic [31:0] wdata = 0, rdata;
  logic [31:0] model [logic [21:0]];
  int checks = 0, failures = 0;

  mib_local_mem dut (.*);
  always #12.5 clk = ~clk;

  task automatic write(input logic [21:0] a, input logic [31:0] d);
    @(negedge clk); en = 1; we = 1; addr = a; wdata = d; model[a] = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic read_check(input logic [21:0] a);
    logic [31:0] held;
    @(negedge clk); en = 1; we = 0; addr = a;
    @(negedge clk); en = 0;
    checks++;
    if (rdata != model[a]) begin failures++; $display("FAIL: %h read %h expected %h", a, rdata, model[a]); end
    held = rdata;
    write(a ^ 22'h1, 32'h5555_AAAA);
    checks++; if (rdata != held) begin failures++; $display("FAIL: rdata not held"); end
  endtask

  initial begin
    logic [21:0] al [$];
    for (int b = 0; b < 4; b++) begin
      al.push_back({2'(b), 20'h0}); al.push_back({2'(b), 20'hFFFFF});
    end
    for (int i = 0; i < 200; i++) al.push_back(22'($urandom) & ~22'h1);
    foreach (al[i]) write(al[i], $urandom);
    foreach (al[i]) read_check(al[i]);
    // banks are distinct: same word index in each bank
    for (int b = 0; b < 4; b++) write({2'(b), 20'h12344}, 32'hB0 + b);
    for (int b = 0; b < 4; b++) read_check({2'(b), 20'h12344});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
