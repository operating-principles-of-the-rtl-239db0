// tb_mib_ext_sbus_if - checks byte pairing and the cable handshake.
// Random bytes with random gaps; the receiver takes words after random
// delays. Every cable word must be the next two bytes, first one high, and
// no word may be lost or repeated.
module tb_mib_ext_sbus_if;
  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic in_valid = 0, in_ready, ext_valid, ext_ready = 0;
  logic [7:0] in_byte = 0; logic [15:0] ext_data;
  logic [7:0] bq [$];
  int checks = 0, failures = 0, nwords = 0, sent = 0;

  mib_ext_sbus_if dut (.*);
  always #12.5 clk = ~clk;

  always @(negedge clk) begin
    ext_ready = ($urandom_range(0, 2) == 0);
    if (ext_ready && ext_valid) begin
      checks++;
      if (ext_data != {bq[0], bq[1]}) begin failures++; $display("FAIL: word %h expected %h", ext_data, {bq[0], bq[1]}); end
      void'(bq.pop_front()); void'(bq.pop_front()); nwords++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    while (sent < 300) begin
      @(negedge clk); #1;
      in_valid = ($urandom_range(0, 1) == 0) && in_ready; in_byte = 8'($urandom);
      if (in_valid) begin bq.push_back(in_byte); sent++; end
      @(posedge clk); #1 in_valid = 0;
    end
    repeat (100) @(negedge clk);
    checks++; if (nwords != 150) begin failures++; $display("FAIL: %0d words", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
