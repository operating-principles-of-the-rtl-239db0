// tb_mib_mem_pointer - checks pointer stepping, simple/circular buffer,
// DROP, forced stores and the write interlock, on a 16-word memory
// (ADDR_BITS = 6) so that the end is reached quickly.
module tb_mib_mem_pointer;
  import mib_pkg::*;
  localparam int AB = 6;
  logic clk = 0, rst_n = 0;
  mib_ctrl_t ctrl = '0;
  logic smwreq = 0, w_valid = 0, w_force = 0, w_accept, st_req, st_done = 0, memfull;
  logic [31:0] w_data = 0, st_data;
  logic [AB-3:0] st_addr;
  mib_breq_t breq = '0; mib_brsp_t rsp;
  int checks = 0, failures = 0;

  mib_mem_pointer #(.ADDR_BITS(AB)) dut (.*);
  always #12.5 clk = ~clk;

  // arbiter stand-in: completes a store two clocks after the request
  logic [31:0] stored [16];
  int pend = 0;
  always @(negedge clk) begin
    st_done = 0;
    if (st_req) begin
      pend++;
      if (pend == 3) begin st_done = 1; stored[st_addr] = st_data; pend = 0; end
    end else pend = 0;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // offer one word; returns 1 if accepted within 20 clocks
  task automatic offer(input logic [31:0] d, input bit force_, output bit taken);
    @(negedge clk); #2 w_valid = 1; w_data = d; w_force = force_; taken = 0;
    for (int t = 0; t < 20 && !taken; t++) begin
      #1 if (w_accept) taken = 1;
      @(negedge clk); #2;
    end
    w_valid = 0; w_force = 0;
  endtask

  task automatic bus(input mib_op_e op, input logic [31:0] d, output mib_brsp_t r);
    @(negedge clk); breq.req = 1; breq.op = op; breq.wdata = d;
    @(negedge clk); breq.req = 0; r = rsp;
  endtask

  initial begin
    bit taken; mib_brsp_t r;
    repeat (2) @(posedge clk); rst_n = 1;
    bus(OP_PTR_RD, 0, r); check(r.ack && r.rdata == 0, "pointer 0 after reset");
    // simple buffer, DROP off
    ctrl.nowrap = 1; ctrl.drop = 0; ctrl.local_ = 1; ctrl.memw = 1;
    for (int i = 0; i < 16; i++) begin
      offer(32'h100 + i, 0, taken); check(taken && stored[i] == 32'h100 + i, "linear placement");
      if (i < 15) check(!memfull, "not full before the last word");
    end
    check(memfull, "MEMFULL after last word");
    bus(OP_PTR_RD, 0, r); check(r.rdata == 32'h3C, "pointer stays at the last word");
    offer(32'hBAD, 0, taken); check(!taken && stored[15] == 32'h10F, "simple buffer, no DROP: word held back");
    ctrl.drop = 1;
    offer(32'hBAD, 0, taken); check(taken && stored[15] == 32'h10F, "DROP: word discarded");
    offer(32'hF0F0, 1, taken); check(taken && stored[15] == 32'hF0F0, "forced store regardless of room");
    // interlock
    bus(OP_PTR_WR, 32'h8, r); check(r.err && !r.ack, "pointer write refused while sampling");
    ctrl.memw = 0; smwreq = 1;
    bus(OP_PTR_WR, 32'h8, r); check(r.err, "pointer write refused while a transfer is in progress");
    smwreq = 0;
    bus(OP_PTR_WR, 32'h8, r); check(r.ack && !memfull, "pointer write accepted when idle");
    bus(OP_PTR_RD, 0, r); check(r.rdata == 32'h8, "pointer read back");
    // circular buffer
    ctrl.memw = 1; ctrl.nowrap = 0; ctrl.drop = 0;
    for (int i = 2; i < 16 + 5; i++) begin
      offer(32'h200 + i, 0, taken); check(taken, "circular: always stores");
      if (i == 15) check(memfull, "MEMFULL marks the wraparound");
    end
    check(stored[0] == 32'h210 && stored[4] == 32'h214 && stored[5] == 32'h205, "circular: oldest overwritten");
    bus(OP_PTR_RD, 0, r); check(r.rdata == 32'h14, "circular pointer after wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
