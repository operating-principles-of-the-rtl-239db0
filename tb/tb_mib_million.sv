// tb_mib_million - the board's capacity workload: one million Trace Samples.
//
// At full size (16 MB local memory, 1024-entry FIFO) the MultiKron model is
// probed NSAMPLES times through VME writes while the board stores Samples
// as a simple buffer with DROP (control D50C01). 16 MB holds exactly
// 1,048,576 Samples of 16 bytes, so the run must end with the pointer at
// FFFFFC, MEMFULL set, the extra Samples dropped and an empty FIFO. Stored
// words are spot-checked over VME against the bytes the model sent: the
// first and last Sample and a word every 4099 words in between. The run
// then switches to the circular buffer, adds 8 more Samples and checks that
// they continue from the last word and overwrite the start of memory.
module tb_mib_million;
  localparam int NSAMPLES = 1048576 + 16;
  import mib_pkg::*;
  localparam logic [31:0] BASE = 32'h2000_0000;

  logic clk = 0, vme_sysreset_n = 1;
  initial #1 vme_sysreset_n = 0;   // a falling edge, so the asynchronous reset takes effect at once
  logic vme_as_n = 1, vme_write_n = 1; logic [1:0] vme_ds_n = 2'b11;
  logic [31:0] vme_addr = 0, vme_wdata = 0, vme_rdata;
  logic vme_data_oe, vme_dtack_n, vme_berr_n;
  logic [6:0] mk_addr; logic [63:0] mk_wdata, mk_rdata; logic mk_cs, mk_we, mk_ready, mk_reset;
  logic [1:0] mk_wait; logic mk_notestb, mk_test2, mk_outen; logic [7:0] mk_tst, mk_cpuid;
  logic [15:0] mk_rc; logic mk_ce20, net_valid, netrdy; logic [9:0] net_data;
  logic [7:0] xcpu = 8'h08; logic [15:0] xrc = 0;
  logic [15:0] ext_data; logic ext_valid, ext_ready = 0;

  int checks = 0, failures = 0;
  int m_wide = 0, m_reset = 0, m_rc_int = 0, m_rc_ext = 0, m_cpu_int = 0, m_cpu_ext = 0,
      m_local = 0, m_interlock = 0, m_full_drop = 0, m_backpressure = 0, m_wrap = 0,
      m_spm = 0, m_manpul = 0, m_mansw = 0, m_ext = 0, m_stall = 0, m_test2 = 0, m_cpumem = 0;

  mib_top dut (.*);
  mk_model mk (.clk, .reset(mk_reset), .addr(mk_addr), .wdata(mk_wdata), .cs(mk_cs), .we(mk_we),
    .rdata(mk_rdata), .ready(mk_ready), .wait_st(mk_wait), .notestb(mk_notestb), .test2(mk_test2),
    .outen(mk_outen), .tst(mk_tst), .cpuid(mk_cpuid), .rc(mk_rc), .ce20(mk_ce20),
    .net_valid, .net_data, .netrdy);

  always #12.5 clk = ~clk;

  // external cable receiver
  logic [15:0] ext_q [$];
  int ext_last = -1, ext_min_gap = 1000, cyc = 0;
  bit ext_random = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (ext_valid && ext_ready) begin
      ext_q.push_back(ext_data);
      // the first two words may leave back to back (one was waiting in the output register)
      if (ext_q.size() > 2 && cyc - ext_last < ext_min_gap) ext_min_gap = cyc - ext_last;
      ext_last = cyc;
    end
  end
  always @(negedge clk) if (ext_random) ext_ready = 1;
  int mk_resets = 0; logic mk_reset_q = 0;
  always @(posedge clk) begin if (mk_reset && !mk_reset_q) mk_resets++; mk_reset_q <= mk_reset; end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // VME cycle: result 0 = DTACK*, 1 = BERR*, 2 = no answer
  task automatic vme(input logic [24:0] ofs, input bit wr, input logic [31:0] d,
                     output int res, output logic [31:0] rd, input int limit = 3000);
    int t;
    @(negedge clk);
    vme_addr = BASE | 32'(ofs); vme_write_n = !wr; vme_wdata = d;
    #3 vme_as_n = 0; #3 vme_ds_n = 2'b00;
    res = 2; rd = 0; t = 0;
    while (t < limit) begin
      @(negedge clk); t++;
      if (!vme_dtack_n) begin res = 0; rd = vme_rdata; break; end
      if (!vme_berr_n)  begin res = 1; break; end
    end
    vme_ds_n = 2'b11; vme_as_n = 1;
    while (!vme_dtack_n || !vme_berr_n) @(negedge clk);
  endtask
  task automatic vw(input logic [24:0] ofs, input logic [31:0] d);
    int res; logic [31:0] rd;
    vme(ofs, 1, d, res, rd);
    check(res == 0, $sformatf("write %h answered", ofs));
  endtask
  task automatic vr(input logic [24:0] ofs, output logic [31:0] rd);
    int res;
    vme(ofs, 0, 0, res, rd);
    check(res == 0, $sformatf("read %h answered", ofs));
  endtask
  task automatic mkw(input logic [6:0] a, input logic [31:0] d);
    vw(OFS_MK_BASE + {a, 2'b00}, d);
  endtask
  task automatic mkr(input logic [6:0] a, output logic [31:0] d);
    vr(OFS_MK_BASE + {a, 2'b00}, d);
  endtask
  task automatic ctrl(input logic [23:0] v); vw(OFS_CTRL, 32'(v)); endtask
  task automatic status(output logic [31:0] s); vr(OFS_STATUS, s); endtask

  // wait until nothing is left in the MultiKron, the FIFO or the packer
  task automatic drain();
    logic [31:0] s;
    for (int i = 0; i < 400; i++) begin
      status(s);
      if (s[9] == 1'b0 && s[19] == 1'b0 && mk.q_data.size() == 0) return;
      repeat (20) @(negedge clk);
    end
    check(0, "drain timed out");
  endtask

  function automatic logic [31:0] logword(input int b);
    return {mk.log_bytes[b], mk.log_bytes[b+1], mk.log_bytes[b+2], mk.log_bytes[b+3]};
  endfunction

  localparam logic [23:0] CTRL_DEF = 24'hD5_0C01;

  initial begin
    logic [31:0] d, s; int base, ok, t0;
    repeat (4) @(negedge clk); vme_sysreset_n = 1;
    repeat (4) @(negedge clk);
    ctrl(CTRL_DEF & ~24'h00_0400);
    vw(OFS_RESET, 0);
    repeat (20) @(negedge clk);
    mkw(7'h40, 32'h0000_0042);
    vw(OFS_PTR_W, 0);
    ctrl(CTRL_DEF);
    base = mk.log_bytes.size();
    t0 = cyc;
    for (int i = 0; i < NSAMPLES; i++) mkw(7'(i % 64), 32'(i));
    drain();
    $display("%0d probes in %0d clocks (%0d ms at 40 MHz)", NSAMPLES, cyc - t0, (cyc - t0) / 40000);
    status(s); vr(OFS_PTR_R, d);
    check(s[21] && d == 32'h00FF_FFFC, $sformatf("memory full after one million Samples, pointer %h", d));
    check(s[9] == 1'b0, "FIFO empty: the Samples beyond capacity were dropped");
    ok = 1;
    for (int w = 0; w < 4194304; w += 4099) begin
      vr(25'(w * 4), d);
      if (d != logword(base + w * 4)) begin ok = 0; $display("  word %0d: %h vs %h", w, d, logword(base + w * 4)); end
    end
    for (int w = 4194304 - 4; w < 4194304; w++) begin
      vr(25'(w * 4), d);
      if (d != logword(base + w * 4)) ok = 0;
    end
    check(ok == 1, "spot-checked words hold the Samples sent, oldest kept");
    // circular buffer: wrap and overwrite the oldest
    ctrl(24'h55_0401);
    base = mk.log_bytes.size();
    for (int i = 0; i < 8; i++) mkw(7'(i), 32'hC000_0000 + 32'(i));
    drain();
    // the full simple buffer left the pointer on the last word, so the first
    // new word lands there and the remaining 31 wrap to the start
    vr(OFS_PTR_R, d); check(d == 32'h0000_007C, $sformatf("circular: 8 Samples after the wrap, pointer %h", d));
    vr(25'h0FF_FFFC, d);
    ok = (d == logword(base));
    for (int w = 0; w < 31; w++) begin
      vr(25'(w * 4), d);
      if (d != logword(base + 4 + w * 4)) ok = 0;
    end
    check(ok == 1, "circular: newest Samples overwrite the start of memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
