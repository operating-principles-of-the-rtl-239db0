// tb_mib_sample_packer - checks byte-to-word packing, WSB, SMWREQ and stalls.
// Random bytes go in with random gaps while the store side accepts words
// after random delays; every word must equal the next four bytes, first byte
// most significant, in order. WSB must count 0..3, SMWREQ must be high
// while bytes are on their way, and the force flag must follow its bytes.
module tb_mib_sample_packer;
  logic clk = 0, rst_n = 0, soft_rst = 0;
  logic in_valid = 0, in_force = 0, in_ready, w_valid, w_force, w_accept = 0, smwreq;
  logic [7:0] in_byte = 0; logic [31:0] w_data; logic [3:0] wsb;
  logic [7:0] bq [$]; logic fq [$];
  int checks = 0, failures = 0, nwords = 0, sent = 0;

  mib_sample_packer dut (.*);
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // store side
  always @(negedge clk) begin
    w_accept = w_valid && ($urandom_range(0, 3) == 0);
    if (w_accept) begin
      logic [31:0] e; logic f;
      e = {bq[0], bq[1], bq[2], bq[3]}; f = fq[0] | fq[1] | fq[2] | fq[3];
      repeat (4) begin void'(bq.pop_front()); void'(fq.pop_front()); end
      check(w_data == e, $sformatf("word %0d %h expected %h", nwords, w_data, e));
      check(w_force == f, "force flag");
      nwords++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); check(wsb == 0 && !smwreq && in_ready, "idle after reset");
    while (sent < 400) begin
      @(negedge clk);
      if ($urandom_range(0, 2) != 0 && in_ready) begin
        in_valid = 1; in_byte = 8'($urandom); in_force = (sent >= 200 && sent < 208);
      end else in_valid = 0;
      #1;
      if (in_valid && in_ready) begin
        check(wsb == 4'(sent % 4), "WSB names the next byte");
        if (sent % 4 != 0) check(smwreq, "SMWREQ while a word is partly assembled");
        bq.push_back(in_byte); fq.push_back(in_force); sent++;
      end
      @(posedge clk); #1 in_valid = 0;
    end
    in_valid = 0;
    repeat (100) @(negedge clk);
    check(nwords == 100, $sformatf("100 words stored (%0d)", nwords));
    check(!smwreq && !w_valid, "SMWREQ low when all stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
