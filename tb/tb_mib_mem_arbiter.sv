// tb_mib_mem_arbiter - checks memory sharing between Sample stores and the CPU.
// The arbiter drives a small local memory (4 banks of 256 words). A store
// source keeps requesting while CPU reads and writes arrive at random; every
// store must land at its address, every CPU read must see the latest value,
// and while both requesters wait continuously their grants must alternate,
// so CPU accesses finish even under a constant Sample stream.
module tb_mib_mem_arbiter;
  import mib_pkg::*;
  localparam int WB = 10;
  logic clk = 0, rst_n = 0;
  logic st_req = 0, st_done; logic [WB-1:0] st_addr = 0; logic [31:0] st_data = 0;
  mib_breq_t breq = '0; mib_brsp_t rsp;
  logic m_en, m_we; logic [WB-1:0] m_addr; logic [31:0] m_wdata, m_rdata;
  logic [31:0] model [1024];
  int checks = 0, failures = 0, nst = 0, ncpu = 0, maxlat = 0;

  mib_mem_arbiter #(.WB(WB)) dut (.*);
  mib_local_mem #(.BANK_WORDS(256), .BANKS(4)) mem (.clk, .en(m_en), .we(m_we), .addr(m_addr),
                                                    .wdata(m_wdata), .rdata(m_rdata));
  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // store stream: always requesting, next address on st_done
  always @(posedge clk) if (rst_n) begin
    if (st_done) begin
      model[st_addr] = st_data; nst++;
      st_addr <= st_addr + 1; st_data <= $urandom;
    end
    st_req <= 1;
  end

  task automatic cpu(input bit wr, input logic [WB-1:0] a, input logic [31:0] d);
    int lat;
    @(negedge clk); breq.req = 1; breq.op = wr ? OP_MEM_WR : OP_MEM_RD; breq.waddr = 22'(a); breq.wdata = d;
    @(negedge clk); breq.req = 0; lat = 1;
    while (!rsp.ack && lat < 100) begin @(negedge clk); lat++; end
    check(rsp.ack, "CPU access completes under a Sample stream");
    if (lat > maxlat) maxlat = lat;
    if (wr) model[a] = d;
    else check(rsp.rdata == model[a], $sformatf("CPU read %h: %h expected %h", a, rsp.rdata, model[a]));
    ncpu++;
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) model[i] = 0;
    @(negedge clk);
    for (int i = 0; i < 1024; i++) begin
      // clear memory through the port before starting
      force m_en = 1; force m_we = 1; force m_addr = WB'(i); force m_wdata = 0;
      @(negedge clk);
    end
    release m_en; release m_we; release m_addr; release m_wdata;
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic [WB-1:0] a;
      a = (i % 3 == 0) ? WB'(st_addr - 3) : WB'($urandom);
      cpu($urandom_range(0, 1), a, $urandom);
    end
    check(maxlat <= 8, $sformatf("CPU waits at most one store (max %0d clocks)", maxlat));
    check(nst >= 300, $sformatf("stores continue while the CPU is served (%0d)", nst));
    // check all stored words through CPU reads with the store stream stopped
    @(negedge clk); force st_req = 0; repeat (5) @(negedge clk);
    for (int i = 0; i < 1024; i += 7) cpu(0, WB'(i), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
