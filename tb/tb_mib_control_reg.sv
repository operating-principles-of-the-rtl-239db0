// tb_mib_control_reg - checks the Control and Counter Input registers.
// Writes random values and the recommended D50C01 setting, checks every
// field against the bit positions of the register table, checks that
// MANPUL/MANSW pulse only on a 0-to-1 change and that each write is
// acknowledged one clock after its request.
module tb_mib_control_reg;
  import mib_pkg::*;
  logic clk = 0, rst_n = 0;
  mib_breq_t breq = '0;
  mib_brsp_t rsp;
  mib_ctrl_t ctrl;
  logic [15:0] irc;
  logic manpul_rise, mansw_rise;
  int checks = 0, failures = 0, np = 0, ns = 0;

  mib_control_reg dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) begin if (manpul_rise) np++; if (mansw_rise) ns++; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input mib_op_e op, input logic [31:0] d);
    @(negedge clk); breq.req = 1; breq.op = op; breq.wdata = d; breq.waddr = '0;
    @(negedge clk); breq.req = 0;
    check(rsp.ack && !rsp.err, "ack one clock after request");
    @(negedge clk); check(!rsp.ack, "single ack");
  endtask

  function automatic bit fields_ok(input logic [23:0] v);
    return ctrl.icpu == v[7:0] && ctrl.manpul == v[8] && ctrl.mansw == v[9] && ctrl.memw == v[10]
        && ctrl.drop == v[11] && ctrl.ext_rsc == v[12] && ctrl.ext_cpu == v[13]
        && ctrl.wait_st == v[17:16] && ctrl.notestb == v[18] && ctrl.test2 == v[19]
        && ctrl.outen == v[20] && ctrl.spm == v[21] && ctrl.local_ == v[22] && ctrl.nowrap == v[23];
  endfunction

  initial begin
    logic [23:0] v;
    repeat (2) @(posedge clk); rst_n = 1;
    check(ctrl == '0 && irc == 0, "reset to zero");
    wr(OP_CTRL_WR, 32'h00D5_0C01);
    check(fields_ok(24'hD50C01), "D50C01 fields");
    check(ctrl.memw && ctrl.drop && !ctrl.ext_rsc && !ctrl.ext_cpu && ctrl.wait_st == 2'b01 &&
          ctrl.notestb && !ctrl.test2 && ctrl.outen && !ctrl.spm && ctrl.local_ && ctrl.nowrap &&
          ctrl.icpu == 8'h01 && !ctrl.manpul && !ctrl.mansw, "D50C01 is the documented default setting");
    for (int i = 0; i < 50; i++) begin
      v = 24'($urandom) & 24'hFFFC_FF;
      wr(OP_CTRL_WR, {8'hAA, v}); check(fields_ok(v), "random control fields");
      wr(OP_CNT_WR, 32'hBEEF_0000 | 32'(i * 77)); check(irc == 16'(i * 77), "counter input register");
      check(fields_ok(v), "control unchanged by counter write");
    end
    // edges
    wr(OP_CTRL_WR, 0); np = 0; ns = 0;
    wr(OP_CTRL_WR, 32'h100); wr(OP_CTRL_WR, 32'h100); check(np == 1 && ns == 0, "MANPUL: one pulse per leading edge");
    wr(OP_CTRL_WR, 32'h300); check(np == 1 && ns == 1, "MANSW leading edge");
    wr(OP_CTRL_WR, 32'h000); wr(OP_CTRL_WR, 32'h300); check(np == 2 && ns == 2, "both again after clear");
    // other ops ignored
    @(negedge clk); breq.req = 1; breq.op = OP_PTR_WR; breq.wdata = 0;
    @(negedge clk); breq.req = 0; check(!rsp.ack && ctrl.mansw, "other operations ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
