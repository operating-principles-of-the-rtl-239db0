// tb_mib_net_if - checks network transfers into the FIFO and Single Pulse Mode.
// A MultiKron stand-in offers bytes continuously. Normal mode: transfers
// happen only on ce20 cycles while the FIFO is not full, one per 20 MHz
// period, with the entry {6'b0, parity, eos, data}. SPM: nothing moves
// until an FPULSE request, after which exactly one byte moves; a pulse
// given while the FIFO is full waits until there is room.
module tb_mib_net_if;
  import mib_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0, ce20 = 0, spm = 0;
  mib_breq_t breq = '0;
  mib_brsp_t rsp;
  logic net_valid = 0; logic [9:0] net_data = 0; logic netrdy;
  logic fifo_full = 0, fifo_we; logic [15:0] fifo_wdata;
  int checks = 0, failures = 0, nw = 0;

  mib_net_if dut (.*);
  always #12.5 clk = ~clk;
  always @(posedge clk) ce20 <= rst_n ? !ce20 : 1'b0;
  always @(posedge clk) if (fifo_we) begin
    nw++;
    checks++;
    if (fifo_wdata != {6'b0, net_data} || !ce20) begin failures++; $display("FAIL: entry/ce20"); end
    net_data <= 10'($urandom);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic fpulse();
    @(negedge clk); breq.req = 1; breq.op = OP_FPULSE;
    @(negedge clk); breq.req = 0; check(rsp.ack, "FPULSE acknowledged");
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    net_valid = 1; nw = 0;
    repeat (100) @(negedge clk);
    check(nw == 50, $sformatf("normal mode: one transfer per 20 MHz period (%0d)", nw));
    fifo_full = 1; #1 check(!netrdy, "NETRDY follows FFB"); nw = 0;
    repeat (20) @(negedge clk); check(nw == 0, "no transfer while full");
    fifo_full = 0;
    spm = 1; nw = 0; @(negedge clk); #1 check(!netrdy, "SPM blocks NETRDY");
    repeat (20) @(negedge clk); check(nw == 0, "SPM: nothing without FPULSE");
    for (int i = 1; i <= 5; i++) begin
      fpulse(); repeat (10) @(negedge clk);
      check(nw == i, "SPM: one byte per FPULSE");
    end
    fifo_full = 1; fpulse(); repeat (10) @(negedge clk); check(nw == 5, "SPM pulse waits while full");
    fifo_full = 0; repeat (10) @(negedge clk); check(nw == 6, "SPM pulse delivered when room");
    spm = 0; repeat (10) @(negedge clk); check(nw > 6, "normal mode again");
    net_valid = 0; nw = 0; repeat (10) @(negedge clk); check(nw == 0, "no transfer without net_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
