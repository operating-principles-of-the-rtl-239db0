// tb_mib_mk_bus_if - checks MultiKron bus cycles and the high-order registers.
//
// A responder plays the MultiKron bus: it holds mk_ready low for a random
// number of wait cycles, records writes and returns a 64-bit read value
// made from the address. Checked: a write carries {0, high-order input
// register, VME data}; the high-order input register persists across writes;
// a read returns bits 31:0 and loads bits 63:32 into the high-order output
// register; the ack comes only after mk_ready; the reset pulse after the
// RESET command lasts MK_RESET_CYCLES clocks.
module tb_mib_mk_bus_if;
  import mib_pkg::*;
  logic clk = 0, rst_n = 0, soft_rst = 0;
  mib_breq_t breq = '0;
  mib_brsp_t rsp;
  logic [6:0] mk_addr; logic [63:0] mk_wdata, mk_rdata; logic mk_cs, mk_we, mk_ready, mk_reset;
  int checks = 0, failures = 0;
  logic [63:0] last_w; logic [6:0] last_a; int waits, cs_cycles;

  mib_mk_bus_if #(.MK_RESET_CYCLES(8)) dut (.*);
  always #12.5 clk = ~clk;

  function automatic logic [63:0] rval(input logic [6:0] a);
    return {8'hA0, 17'(a) * 17'd3, 7'h11, 32'h1234_0000 | 32'(a)};
  endfunction

  // responder
  int cnt = 0;
  always_ff @(posedge clk) begin
    if (mk_cs && !mk_ready) cnt <= cnt + 1;
    if (mk_cs && mk_ready) begin
      cnt <= 0;
      if (mk_we) begin last_w <= mk_wdata; last_a <= mk_addr; end
    end
  end
  always_comb begin
    mk_ready = mk_cs && (cnt >= waits);
    mk_rdata = mk_ready ? rval(mk_addr) : 64'h0;
  end
  always @(posedge clk) if (mk_cs) cs_cycles++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic req(input mib_op_e op, input logic [21:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int lat);
    @(negedge clk); breq.req = 1; breq.op = op; breq.waddr = a; breq.wdata = d;
    @(negedge clk); breq.req = 0; lat = 1;
    while (!rsp.ack && lat < 50) begin @(negedge clk); lat++; end
    check(rsp.ack, "acknowledged");
    rd = rsp.rdata;
  endtask

  initial begin
    logic [31:0] rd; int lat, n; logic [15:0] hi;
    repeat (2) @(posedge clk); rst_n = 1;
    check(mk_reset, "MultiKron held in reset after board reset");
    repeat (10) @(posedge clk);
    check(!mk_reset, "MultiKron reset released");
    hi = 16'h0;
    for (int i = 0; i < 60; i++) begin
      waits = $urandom_range(0, 5);
      case ($urandom_range(0, 3))
        0: begin hi = 16'($urandom); req(OP_HIIN_WR, 0, {16'hFFFF, hi}, rd, lat); check(lat == 1, "register write 1 clock"); end
        1: begin
          n = 32'($urandom); cs_cycles = 0;
          req(OP_MK_WR, 22'($urandom_range(0, 127)) | 22'h3FFF80, n, rd, lat);
          @(negedge clk);
          check(last_w == {16'h0, hi, n[31:0]}, "48-bit MultiKron write = {high-order input, VME data}");
          check(cs_cycles == waits + 1, "strobe held for the wait states");
        end
        2: begin
          n = $urandom_range(0, 127);
          req(OP_MK_RD, 22'(n), 0, rd, lat);
          check(rd == rval(7'(n))[31:0], "MultiKron read low word");
          req(OP_HIOUT_RD, 0, 0, rd, lat);
          check(rd == rval(7'(n))[63:32], "high-order output register loaded by the read");
        end
        default: begin
          req(OP_HIOUT_RD, 0, 0, rd, lat); check(lat == 1, "register read 1 clock");
        end
      endcase
    end
    // address bits
    waits = 0;
    req(OP_MK_WR, 22'h55, 32'h1, rd, lat); @(negedge clk); check(last_a == 7'h55, "MultiKron address = word offset");
    // software reset
    @(negedge clk); soft_rst = 1; @(negedge clk); soft_rst = 0;
    n = 0; while (mk_reset && n < 40) begin n++; @(negedge clk); end
    check(n == 8, $sformatf("reset pulse 8 clocks (got %0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
