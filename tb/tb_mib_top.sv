// tb_mib_top - end-to-end test of the interface board with a MultiKron model.
//
// Runs the board as software would, through VME cycles only, against the
// behavioural MultiKron (mk_model), with a small memory (4 banks of 16
// words, i.e. 16 Trace Samples) and a 64-entry FIFO so that every limit is
// reached quickly. It exercises and counts: register setup and the version
// read, 48-bit MultiKron writes and 64-bit reads through the high-order
// registers, the RESET command, resource counter inputs from the register
// and from the connector, CPU ID from the register and from the connector,
// Sample storage in local memory (contents compared byte for byte with what
// the MultiKron sent), the pointer interlock, the simple buffer filling up
// with DROP, FIFO backpressure without DROP, the circular buffer wrapping,
// Single Pulse Mode with FPULSE, MANPUL, MANSW, the external cable
// including a MultiKron stall of the VME bus, TEST2 output, and CPU access
// to local memory. Each mechanism must happen at least once.
module tb_mib_top;
  import mib_pkg::*;
  localparam logic [31:0] BASE = 32'h2000_0000;
  localparam int BW = 16, NB = 4, MW = BW * NB, FD = 64;

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

  mib_top #(.FIFO_DEPTH(FD), .BANK_WORDS(BW), .BANKS(NB)) dut (.*);
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
    logic [31:0] d, s; int res, base, ok;
    repeat (4) @(negedge clk); vme_sysreset_n = 1;
    repeat (4) @(negedge clk);

    // --- identification and setup
    vr(OFS_VERSION, d); check(d == 32'h03, "board version 03");
    vr(OFS_R_NA0, d);   check(d == 0, "N/A reads 0");
    ctrl(CTRL_DEF);
    vw(OFS_CNTIN, 0);
    vw(OFS_RESET, 0);
    repeat (20) @(negedge clk);
    check(mk_resets == 2 && mk.ws == 2'b01, "RESET resets the MultiKron, which latches WAIT = 01");
    if (mk_resets == 2) m_reset++;

    // --- 48-bit write and 64-bit read through the high-order registers
    vw(OFS_HIIN, 32'h0000_BEEF);
    mkw(7'h60, 32'h1234_5678);
    check(mk.scratch == 48'hBEEF_1234_5678, "48-bit MultiKron write");
    mkr(7'h60, d); check(d == 32'h1234_5678, "64-bit read, low half");
    vr(OFS_HIOUT, d); check(d == 32'hFEED_BEEF, "64-bit read, high half from the output register");
    if (mk.scratch == 48'hBEEF_1234_5678 && d == 32'hFEED_BEEF) m_wide++;

    // --- Source Address registers for CPU 0 and CPU 3
    mkw(7'h40, 32'hA0A0_0000);
    mkw(7'h43, 32'hA3A3_0003);

    // --- resource counter inputs: register, then connector
    for (int i = 0; i < 2; i++) begin vw(OFS_CNTIN, 32'h0005); vw(OFS_CNTIN, 0); end
    mkr(7'h50, d); check(d == 2, "counter 0 counted two register edges");
    mkr(7'h52, d); check(d == 2, "counter 2 counted two register edges");
    if (d == 2) m_rc_int++;
    ctrl(CTRL_DEF | 24'h00_1000);          // EXT_RSC
    for (int i = 0; i < 3; i++) begin
      @(negedge clk) xrc = 16'h0002; repeat (3) @(negedge clk); xrc = 0; repeat (3) @(negedge clk);
      vw(OFS_CNTIN, 32'h0001); vw(OFS_CNTIN, 0);  // ignored now
    end
    mkr(7'h51, d); check(d == 3, "counter 1 counted three connector edges");
    mkr(7'h50, s); check(s == 2, "register edges ignored with EXT_RSC");
    if (d == 3 && s == 2) m_rc_ext++;

    // --- pointer interlock: sampling enabled -> bus error
    ctrl(CTRL_DEF);
    vme(OFS_PTR_W, 1, 0, res, d); check(res == 1, "pointer write during sampling gives BERR*");
    if (res == 1) m_interlock++;
    ctrl(CTRL_DEF & ~24'h00_0400);         // MEMW = 0
    vw(OFS_PTR_W, 0);
    ctrl(CTRL_DEF);

    // --- Samples to local memory, simple buffer; CPU ID from register and connector
    base = mk.log_bytes.size();
    for (int i = 0; i < 4; i++) mkw(7'(i), 32'h1000 + 32'(i));
    ctrl(CTRL_DEF | 24'h00_2000);          // EXT_CPU: connector says CPU 3
    for (int i = 4; i < 8; i++) mkw(7'(i), 32'h1000 + 32'(i));
    ctrl(CTRL_DEF);
    drain();
    vr(OFS_PTR_R, d); check(d == 32'h80, $sformatf("pointer after 8 Samples (%h)", d));
    ok = 1;
    for (int w = 0; w < 32; w++) begin
      vr(25'(w * 4), d);
      if (d != logword(base + w * 4)) begin ok = 0; $display("  word %0d %h vs %h", w, d, logword(base + w * 4)); end
    end
    check(ok == 1, "memory holds exactly the bytes the MultiKron sent");
    if (ok) m_local++;
    vr(25'h00, s);  check(s[31:29] == 3'd0 && mk.log_bytes[base + 10] == 8'hA0, "register CPU ID -> CPU 0");
    if (s[31:29] == 3'd0 && mk.log_bytes[base + 10] == 8'hA0) m_cpu_int++;
    vr(25'h40, d);  check(d[31:29] == 3'd3, "connector CPU ID -> CPU 3");
    vr(25'h48, s);  check(s[15:0] == 16'hA3A3, "CPU 3 Source Address register in the Sample");
    if (d[31:29] == 3'd3 && s[15:0] == 16'hA3A3) m_cpu_ext++;

    // --- fill the simple buffer; DROP discards the rest
    for (int i = 8; i < 18; i++) mkw(7'(i), 32'h2000 + 32'(i));
    drain();
    status(s); vr(OFS_PTR_R, d);
    check(s[21] && d == 32'hFC, "simple buffer: MEMFULL and pointer held at the last word");
    vr(25'hFC, d); check(d == logword(base + 16 * 16 - 4), "last word is from Sample 16");
    vr(25'h00, d); check(d == logword(base), "oldest data kept");
    if (s[21] && s[9] == 1'b0) m_full_drop++;

    // --- without DROP the FIFO backs up to the MultiKron
    ctrl(CTRL_DEF & ~24'h00_0800);
    for (int i = 0; i < 6; i++) mkw(7'(i), 32'h3000);
    repeat (200) @(negedge clk);
    status(s);
    check(s[10] == 1'b0 && s[11] == 1'b0, "FIFO full: FFB = 0 and NETRDY = 0");
    // 96 bytes sent: 64 fill the FIFO, 7 wait in the packer, 25 stay in the MultiKron
    check(mk.q_data.size() == 96 - FD - 7, $sformatf("remaining bytes wait in the MultiKron (%0d)", mk.q_data.size()));
    if (s[10] == 1'b0 && mk.q_data.size() == 96 - FD - 7) m_backpressure++;
    ctrl(CTRL_DEF);                        // DROP again: everything drains
    drain();
    status(s); check(s[10] && !s[9], "FIFO empty again after DROP");

    // --- circular buffer
    ctrl(CTRL_DEF & ~24'h00_0400);
    vw(OFS_PTR_W, 0);
    status(s); check(!s[21], "pointer write clears MEMFULL");
    ctrl(24'h55_0401);                     // NOWRAP = 0, DROP = 0
    base = mk.log_bytes.size();
    for (int i = 0; i < 20; i++) mkw(7'(i % 32), 32'h4000 + 32'(i));
    drain();
    status(s); vr(OFS_PTR_R, d);
    check(s[21] && d == 32'h40, $sformatf("circular: wrapped, MEMFULL set, pointer %h", d));
    ok = 1;
    for (int w = 0; w < MW; w++) begin
      int smp;
      vr(25'(w * 4), d);
      smp = (w < 16) ? 16 + w / 4 : w / 4;
      if (d != logword(base + smp * 16 + (w % 4) * 4)) ok = 0;
    end
    check(ok == 1, "circular buffer keeps the newest 16 Samples");
    if (ok && s[21]) m_wrap++;

    // --- Single Pulse Mode, MANPUL and MANSW
    ctrl(CTRL_DEF & ~24'h00_0400);         // stop storing
    vw(OFS_PTR_W, 0);
    ctrl((CTRL_DEF & ~24'h00_0400) | 24'h20_0000);   // SPM
    base = mk.log_bytes.size();
    mkw(7'h7, 32'hCAFE_F00D);
    repeat (100) @(negedge clk);
    status(s); check(s[9] == 1'b0, "SPM: nothing enters the FIFO by itself");
    for (int i = 0; i < 5; i++) vw(OFS_FPULSE, 0);
    repeat (20) @(negedge clk);
    check(mk.q_data.size() == 11, "SPM: one byte per FPULSE");
    if (mk.q_data.size() == 11) m_spm++;
    ctrl((CTRL_DEF & ~24'h00_0400) | 24'h20_0100);   // MANPUL
    vr(OFS_FIFOTEST, d);
    check(d == {22'h0, ~^{1'b0, mk.log_bytes[base]}, 1'b0, mk.log_bytes[base]},
          $sformatf("MANPUL: first entry in the FIFO TEST register (%h)", d));
    if (d[7:0] == mk.log_bytes[base]) m_manpul++;
    ctrl((CTRL_DEF & ~24'h00_0400) | 24'h20_0200);   // MANPUL off, MANSW
    repeat (20) @(negedge clk);
    vr(25'h0, d); check(d == logword(base + 1), "MANSW: next four entries stored as one word");
    vr(OFS_PTR_R, s); check(s == 4, "MANSW advanced the pointer");
    if (d == logword(base + 1) && s == 4) m_mansw++;
    ctrl(CTRL_DEF & ~24'h00_0400);
    vw(OFS_RESET, 0);
    repeat (20) @(negedge clk);
    status(s); check(s[9] == 1'b0 && mk.q_data.size() == 0 && mk_resets == 3, "RESET empties FIFO and MultiKron");

    // --- external cable, with a MultiKron stall of the VME bus
    ctrl(24'h95_0C01);                     // LOCAL = 0
    ext_q.delete(); ext_ready = 0;
    base = mk.log_bytes.size();
    for (int i = 0; i < 6; i++) mkw(7'(i), 32'h5000 + 32'(i));
    fork
      begin
        int r; logic [31:0] x;
        vme(OFS_MK_BASE + 25'h18, 1, 32'h5006, r, x, 20000);
        check(r == 0, "stalled probe completes");
      end
      begin
        repeat (400) @(negedge clk);
        check(mk_cs && !mk_ready, "probe write stalled while the MultiKron is full");
        if (mk_cs && !mk_ready) m_stall++;
        ext_random = 1;
      end
    join
    drain();
    repeat (50) @(negedge clk);
    check(ext_q.size() == 7 * 8, $sformatf("cable words (%0d)", ext_q.size()));
    ok = 1;
    foreach (ext_q[i]) if (ext_q[i] != {mk.log_bytes[base + 2*i], mk.log_bytes[base + 2*i + 1]}) ok = 0;
    check(ok == 1, "cable carries the Sample bytes in pairs");
    if (!ok) for (int i = 0; i < 12; i++) $display("  ext %h log %h%h", ext_q[i], mk.log_bytes[base + 2*i], mk.log_bytes[base + 2*i + 1]);
    check(ext_min_gap >= 8, $sformatf("cable rate at most one word per 8 clocks (%0d)", ext_min_gap));
    if (ok && ext_q.size() == 56) m_ext++;

    // --- TEST2 output and CPU access to memory
    ctrl(CTRL_DEF | 24'h08_0000);
    status(s); check(s[7:0] == 8'(mk.seq) && mk.seq != 0, "TEST2 output in status bits 7:0");
    if (s[7:0] == 8'(mk.seq)) m_test2++;
    ctrl(CTRL_DEF);
    vw(25'h24, 32'h7777_1234); vr(25'h24, d);
    check(d == 32'h7777_1234, "CPU write and read of local memory");
    if (d == 32'h7777_1234) m_cpumem++;

    // --- every mechanism happened
    $display("mechanisms: wide=%0d reset=%0d rc_int=%0d rc_ext=%0d cpu_int=%0d cpu_ext=%0d local=%0d interlock=%0d",
             m_wide, m_reset, m_rc_int, m_rc_ext, m_cpu_int, m_cpu_ext, m_local, m_interlock);
    $display("mechanisms: full_drop=%0d backpressure=%0d wrap=%0d spm=%0d manpul=%0d mansw=%0d ext=%0d stall=%0d test2=%0d cpumem=%0d",
             m_full_drop, m_backpressure, m_wrap, m_spm, m_manpul, m_mansw, m_ext, m_stall, m_test2, m_cpumem);
    check(m_wide > 0 && m_reset > 0 && m_rc_int > 0 && m_rc_ext > 0 && m_cpu_int > 0 && m_cpu_ext > 0 &&
          m_local > 0 && m_interlock > 0 && m_full_drop > 0 && m_backpressure > 0 && m_wrap > 0 &&
          m_spm > 0 && m_manpul > 0 && m_mansw > 0 && m_ext > 0 && m_stall > 0 && m_test2 > 0 &&
          m_cpumem > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
