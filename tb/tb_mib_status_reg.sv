// tb_mib_status_reg - checks the status word bit positions against random
// status line values and the one-clock read answer.
module tb_mib_status_reg;
  import mib_pkg::*;
  logic clk = 0, rst_n = 0;
  mib_breq_t breq = '0;
  mib_brsp_t rsp;
  logic [7:0] tst; logic efb, ffb, netrdy, smwreq, memfull; logic [3:0] wsb;
  int checks = 0, failures = 0;

  mib_status_reg dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    logic [31:0] exp;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      {tst, efb, ffb, netrdy, smwreq, memfull, wsb} = 17'($urandom);
      exp = 0; exp[7:0] = tst; exp[9] = efb; exp[10] = ffb; exp[11] = netrdy;
      exp[15:12] = wsb; exp[19] = smwreq; exp[21] = memfull;
      breq.req = 1; breq.op = (i % 7 == 3) ? OP_FQ_RD : OP_STATUS_RD;
      @(negedge clk); breq.req = 0;
      checks++;
      if (i % 7 == 3) begin
        if (rsp.ack) begin failures++; $display("FAIL: answered another op"); end
      end else if (!rsp.ack || rsp.rdata != exp) begin
        failures++; $display("FAIL: status %h expected %h", rsp.rdata, exp);
      end
      @(negedge clk);
      checks++; if (rsp.ack || rsp.rdata != 0) begin failures++; $display("FAIL: response not idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
