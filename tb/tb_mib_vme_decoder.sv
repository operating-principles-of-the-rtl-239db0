// tb_mib_vme_decoder - checks address decoding and the VME handshake.
//
// A VME master task runs AS*/DS*/WRITE* cycles; a small responder stands in
// for the board's targets: it records each request and answers after a
// random delay with read data derived from the operation and offset, or with
// err for one chosen offset. Every offset of the address map is tried for
// read and write; the expected operation comes from a table written here.
// Unlisted offsets, reads of write-only registers and addresses outside the
// window must get no DTACK*. RESET must pulse soft_rst; the version read
// must return 03.
module tb_mib_vme_decoder;
  import mib_pkg::*;
  localparam logic [31:0] BASE = 32'h2000_0000;

  logic clk = 0, rst_n = 0;
  logic vme_as_n = 1, vme_write_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [31:0] vme_addr = 0, vme_wdata = 0, vme_rdata;
  logic vme_data_oe, vme_dtack_n, vme_berr_n, soft_rst;
  mib_breq_t breq;
  mib_brsp_t brsp;
  int checks = 0, failures = 0, soft_cnt = 0;

  mib_vme_decoder #(.BASE_ADDR(BASE)) dut (.*);
  always #12.5 clk = ~clk;

  // responder
  mib_op_e   last_op;
  logic [21:0] last_waddr;
  logic [31:0] last_wdata;
  int        nreq = 0;
  logic [31:0] err_waddr = 32'hFFFF_FFFF;
  initial brsp = '0;
  always @(posedge clk) begin
    if (breq.req) begin
      last_op = breq.op; last_waddr = breq.waddr; last_wdata = breq.wdata; nreq++;
      repeat (1 + $urandom_range(0, 3)) @(posedge clk);
      brsp.ack   <= (32'(breq.waddr) != err_waddr);
      brsp.err   <= (32'(breq.waddr) == err_waddr);
      brsp.rdata <= {breq.op, 5'h0, breq.waddr} ^ 32'h5A5A_0000;
      @(posedge clk);
      brsp <= '0;
    end
  end
  always @(posedge clk) if (soft_rst) soft_cnt++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One VME cycle; returns 0 = DTACK, 1 = BERR, 2 = no answer.
  task automatic vme(input logic [31:0] a, input bit wr, input logic [31:0] d,
                     output int result, output logic [31:0] rd);
    int t;
    @(negedge clk);
    vme_addr = a; vme_write_n = !wr; vme_wdata = d;
    #5 vme_as_n = 0; #5 vme_ds_n = 2'b00;
    t = 0; result = 2; rd = 0;
    while (t < 40) begin
      @(negedge clk); t++;
      if (!vme_dtack_n) begin result = 0; rd = vme_rdata; check(vme_data_oe == !wr, "data_oe on read only"); break; end
      if (!vme_berr_n)  begin result = 1; break; end
    end
    vme_ds_n = 2'b11; vme_as_n = 1;
    t = 0;
    while ((!vme_dtack_n || !vme_berr_n) && t < 20) begin @(negedge clk); t++; end
    check(vme_dtack_n && vme_berr_n, "DTACK*/BERR* released after DS*");
    repeat (2) @(negedge clk);
  endtask

  function automatic mib_op_e expect_op(input logic [24:0] o, input bit wr);
    if (!o[24]) return wr ? OP_MEM_WR : OP_MEM_RD;
    if (o >= 25'h100_0000 && o <= 25'h100_01FC) return wr ? OP_MK_WR : OP_MK_RD;
    if (wr) case (o)
      25'h100_0400: return OP_CTRL_WR;   25'h100_0404: return OP_CNT_WR;
      25'h100_0408, 25'h100_040C: return OP_NA;
      25'h100_0410: return OP_PTR_WR;    25'h100_0414: return OP_HIIN_WR;
      25'h100_0418: return OP_FPULSE;    25'h100_041C: return OP_RESET;
      default: return OP_NONE;
    endcase
    case (o)
      25'h100_0500: return OP_STATUS_RD; 25'h100_0504: return OP_FQ_RD;
      25'h100_0508, 25'h100_050C: return OP_NA;
      25'h100_0510: return OP_PTR_RD;    25'h100_0514: return OP_HIOUT_RD;
      25'h100_0518: return OP_VER_RD;
      default: return OP_NONE;
    endcase
  endfunction

  initial begin
    int res, n0, s0;
    logic [31:0] rd;
    logic [24:0] ofs [$];
    mib_op_e e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ofs = '{25'h000_0000, 25'h000_1234, 25'h0FF_FFFC, 25'h100_0000, 25'h100_0044, 25'h100_01FC,
            25'h100_0200, 25'h100_0400, 25'h100_0404, 25'h100_0408, 25'h100_040C, 25'h100_0410,
            25'h100_0414, 25'h100_0418, 25'h100_041C, 25'h100_0420, 25'h100_0500, 25'h100_0504,
            25'h100_0508, 25'h100_050C, 25'h100_0510, 25'h100_0514, 25'h100_0518, 25'h100_051C,
            25'h180_0000};
    foreach (ofs[i]) for (int w = 0; w < 2; w++) begin
      e  = expect_op(ofs[i], w[0]);
      n0 = nreq; s0 = soft_cnt;
      vme(BASE | 32'(ofs[i]), w[0], 32'hCAFE_0000 | 32'(i), res, rd);
      if (e == OP_NONE) begin
        check(res == 2 && nreq == n0, $sformatf("no answer at %h wr=%0d", ofs[i], w));
      end else if (e == OP_NA || e == OP_VER_RD || e == OP_RESET) begin
        check(res == 0 && nreq == n0, $sformatf("local answer at %h", ofs[i]));
        if (e == OP_VER_RD) check(rd == 32'h03, "version 03");
        if (e == OP_NA && !w[0]) check(rd == 0, "N/A reads 0");
        check((soft_cnt - s0) == (e == OP_RESET ? 1 : 0), "soft_rst only on RESET");
      end else begin
        check(res == 0 && nreq == n0 + 1, $sformatf("request at %h wr=%0d", ofs[i], w));
        check(last_op == e, $sformatf("op %s expected %s at %h", last_op.name(), e.name(), ofs[i]));
        check(last_waddr == ofs[i][23:2], "word offset");
        if (w[0]) check(last_wdata == (32'hCAFE_0000 | 32'(i)), "write data");
        else      check(rd == ({e, 5'h0, ofs[i][23:2]} ^ 32'h5A5A_0000), "read data returned");
      end
    end
    // outside the window
    n0 = nreq;
    vme(32'h2200_0000, 0, 0, res, rd); check(res == 2 && nreq == n0, "other window ignored");
    vme(32'h0000_0400, 1, 0, res, rd); check(res == 2 && nreq == n0, "address 0 ignored");
    // error path -> BERR*
    err_waddr = 32'h104;  // bits [23:2] of offset 100_0410
    vme(BASE | 32'h100_0410, 1, 0, res, rd); check(res == 1, "target error gives BERR*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
