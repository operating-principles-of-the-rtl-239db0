// tb_mib_fifo_reader - checks which consumer gets FIFO entries, and at what rate.
// A queue stands in for the FIFO; the packer and cable sides are always
// ready unless a test holds them off. Checked: local mode pops only on ce20
// cycles and only with MEMW; external mode only on ce10 cycles; MANPUL
// moves exactly one entry into the test register (read back over the bus);
// MANSW moves exactly four entries, flagged force, even with MEMW = 0;
// nothing moves while the consumer is not ready.
module tb_mib_fifo_reader;
  import mib_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, ce20, ce10;
  logic [1:0] ph = 0;
  mib_ctrl_t ctrl = '0;
  logic manpul_rise = 0, mansw_rise = 0;
  logic fifo_empty, fifo_rd; logic [15:0] fifo_rdata;
  logic pk_valid, pk_force, pk_ready = 1, ex_valid, ex_ready = 1;
  logic [7:0] pk_byte, ex_byte;
  mib_breq_t breq = '0; mib_brsp_t rsp; logic [15:0] fq;
  logic [15:0] q [$];
  int checks = 0, failures = 0, npk = 0, nex = 0, nforce = 0, nbad = 0;
  int next = 0;

  mib_fifo_reader dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ph + 1 : 0;
  assign ce20 = rst_n && ph[0];
  assign ce10 = rst_n && ph == 3;
  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = fifo_empty ? 16'h0 : q[0];

  always @(posedge clk) begin
    if (fifo_rd) begin
      if (fifo_empty) nbad++;
      else void'(q.pop_front());
    end
    if (pk_valid) begin
      npk++; if (pk_force) nforce++;
      if (!ce20 || !pk_ready || pk_byte != fifo_rdata[7:0]) nbad++;
    end
    if (ex_valid) begin
      nex++;
      if (!ce10 || !ex_ready || ex_byte != fifo_rdata[7:0]) nbad++;
    end
    if ((pk_valid || ex_valid) && !fifo_rd) nbad++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic fill(input int n);
    for (int i = 0; i < n; i++) begin q.push_back(16'h0300 | 16'(next[7:0])); next++; end
  endtask
  task automatic reset_counts(); npk = 0; nex = 0; nforce = 0; endtask

  initial begin
    logic [15:0] expect_fq;
    repeat (2) @(posedge clk); rst_n = 1;
    // LOCAL = 1 without MEMW: nothing moves
    ctrl.local_ = 1; fill(40); repeat (20) @(negedge clk); check(q.size() == 40, "LOCAL without MEMW: FIFO untouched");
    // local, memw
    ctrl.local_ = 1; ctrl.memw = 1; reset_counts();
    repeat (40) @(negedge clk);
    check(npk == 20 && nex == 0 && nforce == 0, $sformatf("local: 20 bytes in 40 clocks (%0d)", npk));
    pk_ready = 0; reset_counts(); repeat (10) @(negedge clk); check(npk == 0, "local: waits for packer");
    pk_ready = 1;
    repeat (60) @(negedge clk); check(q.size() == 0, "local drained");
    // external
    ctrl.local_ = 0; fill(40); reset_counts();
    repeat (40) @(negedge clk);
    check(nex == 10 && npk == 0, $sformatf("external: 10 bytes in 40 clocks (%0d)", nex));
    ex_ready = 0; reset_counts(); repeat (12) @(negedge clk); check(nex == 0, "external: waits for cable");
    ex_ready = 1; repeat (200) @(negedge clk); check(q.size() == 0, "external drained");
    // MANPUL
    ctrl.local_ = 1; ctrl.memw = 0; fill(6); expect_fq = q[0];
    @(negedge clk); manpul_rise = 1; @(negedge clk); manpul_rise = 0;
    repeat (5) @(negedge clk);
    check(q.size() == 5 && fq == expect_fq, "MANPUL moves one entry to the test register");
    @(negedge clk); breq.req = 1; breq.op = OP_FQ_RD; @(negedge clk); breq.req = 0;
    check(rsp.ack && rsp.rdata == {16'h0, expect_fq}, "FIFO TEST register read");
    // MANPUL with empty FIFO waits for data
    q.delete(); @(negedge clk); manpul_rise = 1; @(negedge clk); manpul_rise = 0;
    repeat (5) @(negedge clk); fill(2); expect_fq = q[0]; repeat (3) @(negedge clk);
    check(q.size() == 1 && fq == expect_fq, "MANPUL waits for data");
    // MANSW
    fill(9); reset_counts();
    @(negedge clk); mansw_rise = 1; @(negedge clk); mansw_rise = 0;
    repeat (20) @(negedge clk);
    check(npk == 4 && nforce == 4 && q.size() == 6, "MANSW moves four forced entries");
    check(nbad == 0, "no pop without data, bytes match, rates respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
