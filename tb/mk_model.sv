// mk_model - behavioural stand-in for the MultiKron chip, for testbenches only.
//
// Not synthesizable and not the real chip: it reproduces just enough of the
// pins the interface board uses.
//  * Bus: a cycle (cs) ends with ready after the wait-state count latched at
//    reset plus one clock. Register map of this model (word addresses):
//      00-3F  W  probe: queue a 16-byte Trace Sample (stalls while the
//                internal FIFO has no room for it)
//      40-47  W  Source Address register n (selected by the CPU ID line)
//      50-5F  R  edge count of resource counter input n
//      60     W/R 48-bit scratch register, read back as {16'hFEED, 48 bits}
//  * Trace Sample bytes: {cpu index, probe address[4:0]}, sequence number,
//    probe data[31:0] MSB first, cycle count[31:0], source address[31:0],
//    probe data[47:32]. The last byte carries the end-of-Sample flag; every
//    byte carries odd parity over {eos, data}.
//  * Network: one byte per ce20 cycle while netrdy is high and outen is set.
//  * Every queued byte is also appended to `log_bytes` (with `log_eos`) so a
//    testbench can compare what the board stored with what was sent.
module mk_model #(
  parameter int unsigned IFIFO_BYTES = 32
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [6:0]  addr,
  input  logic [63:0] wdata,
  input  logic        cs,
  input  logic        we,
  output logic [63:0] rdata,
  output logic        ready,
  input  logic [1:0]  wait_st,
  input  logic        notestb,
  input  logic        test2,
  input  logic        outen,
  output logic [7:0]  tst,
  input  logic [7:0]  cpuid,
  input  logic [15:0] rc,
  input  logic        ce20,
  output logic        net_valid,
  output logic [9:0]  net_data,
  input  logic        netrdy
);
  logic [7:0]  q_data [$];
  logic        q_eos [$];
  logic [7:0]  log_bytes [$];
  logic        log_eos [$];
  logic [31:0] src [8];
  logic [47:0] scratch;
  int          rc_cnt [16];
  logic [15:0] rc_q;
  logic [1:0]  ws;
  int          wcnt, seq, cyc, stalls;

  initial begin
    ws = 2'd1; wcnt = 0; seq = 0; cyc = 0; stalls = 0; scratch = '0; rc_q = '0;
    for (int i = 0; i < 8; i++) src[i] = '0;
    for (int i = 0; i < 16; i++) rc_cnt[i] = 0;
  end

  function automatic int cpu_index(input logic [7:0] id);
    for (int i = 0; i < 8; i++) if (id[i]) return i;
    return 0;
  endfunction

  task automatic push(input logic [7:0] b, input logic e);
    q_data.push_back(b); q_eos.push_back(e);
    log_bytes.push_back(b); log_eos.push_back(e);
  endtask

  task automatic make_sample(input logic [6:0] a, input logic [47:0] d);
    int c;
    logic [7:0] s [16];
    c = cpu_index(cpuid);
    s[0] = {3'(c), a[4:0]}; s[1] = 8'(seq);
    {s[2], s[3], s[4], s[5]} = d[31:0];
    {s[6], s[7], s[8], s[9]} = 32'(cyc);
    {s[10], s[11], s[12], s[13]} = src[c];
    {s[14], s[15]} = d[47:32];
    for (int i = 0; i < 16; i++) push(s[i], i == 15);
    seq++;
  endtask

  assign tst       = test2 ? 8'(seq) : 8'h00;
  assign net_valid = outen && notestb && (q_data.size() > 0) && !reset;
  assign net_data  = (q_data.size() > 0) ? {~^{q_eos[0], q_data[0]}, q_eos[0], q_data[0]} : 10'h0;

  always_comb begin
    ready = cs && (wcnt >= int'(ws));
    if (cs && we && addr < 7'h40 && (q_data.size() + 16 > IFIFO_BYTES)) ready = 1'b0;
    rdata = 64'h0;
    if (ready && !we) begin
      if (addr >= 7'h50 && addr < 7'h60) rdata = 64'(rc_cnt[addr - 7'h50]);
      else if (addr == 7'h60)            rdata = {16'hFEED, scratch};
    end
  end

  // Inputs are sampled at the clock edge, and the model's state changes 1 ns
  // later, so the board always sees the values from before the edge.
  always @(posedge clk) begin
    logic r, pop, c, rdy, w;
    logic [6:0] a; logic [63:0] d; logic [15:0] rcs; logic [1:0] wst;
    r = reset; pop = net_valid && netrdy && ce20; c = cs; rdy = ready; w = we;
    a = addr; d = wdata; rcs = rc; wst = wait_st;
    #1;
    cyc++;
    if (r) begin
      ws = wst; wcnt = 0; seq = 0;
      q_data.delete(); q_eos.delete();
      for (int i = 0; i < 16; i++) rc_cnt[i] = 0;
      rc_q = rcs;
    end else begin
      for (int i = 0; i < 16; i++) if (rcs[i] && !rc_q[i]) rc_cnt[i]++;
      rc_q = rcs;
      if (pop) begin
        void'(q_data.pop_front()); void'(q_eos.pop_front());
      end
      if (c && !rdy && wcnt >= int'(ws)) stalls++;
      if (c && !rdy) wcnt++;
      else if (c && rdy) begin
        wcnt = 0;
        if (w) begin
          if (a < 7'h40)       make_sample(a, d[47:0]);
          else if (a < 7'h48)  src[a - 7'h40] = d[31:0];
          else if (a == 7'h60) scratch = d[47:0];
        end
      end
    end
  end
endmodule
