// mib_control_reg - MIB Control register and Counter Input register.
//
// Both registers are write-only from the VME bus. The 24-bit Control
// register (layout mib_pkg::mib_ctrl_t) holds the CPU ID lines, the test
// controls MANPUL and MANSW, the Sample storage options (MEMW, DROP, LOCAL,
// NOWRAP), the input source selects (EXT_RSC, EXT_CPU) and the MultiKron
// control lines (WAIT, NOTESTB, TEST2, OUTEN, SPM). The 16-bit Counter
// Input register drives the MultiKron resource counter inputs when EXT_RSC
// is 0; software toggles its bits to make counting edges.
//
// MANPUL and MANSW act on their leading edge: a write that changes the bit
// from 0 to 1 produces a one-clock pulse on manpul_rise / mansw_rise, and
// the bit must be written 0 again before the next pulse. Each write is
// acknowledged on the following clock. Both registers reset to zero on board
// (SYSRESET*) reset only; the RESET command leaves them alone so that the
// WAIT setting is present when the MultiKron leaves reset. The reset value
// and the MANSW edge behaviour are this design's choices.
module mib_control_reg
  import mib_pkg::*;
#(
  parameter logic [23:0] CTRL_RESET = 24'h00_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mib_breq_t   breq,
  output mib_brsp_t   rsp,
  output mib_ctrl_t   ctrl,
  output logic [15:0] irc,
  output logic        manpul_rise,
  output logic        mansw_rise
);
  mib_ctrl_t nxt;
  assign nxt = mib_ctrl_t'(breq.wdata[23:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl        <= mib_ctrl_t'(CTRL_RESET);
      irc         <= '0;
      rsp         <= BRSP_IDLE;
      manpul_rise <= 1'b0;
      mansw_rise  <= 1'b0;
    end else begin
      rsp         <= BRSP_IDLE;
      manpul_rise <= 1'b0;
      mansw_rise  <= 1'b0;
      if (breq.req && breq.op == OP_CTRL_WR) begin
        ctrl        <= nxt;
        manpul_rise <= nxt.manpul && !ctrl.manpul;
        mansw_rise  <= nxt.mansw  && !ctrl.mansw;
        rsp.ack     <= 1'b1;
      end
      if (breq.req && breq.op == OP_CNT_WR) begin
        irc     <= breq.wdata[15:0];
        rsp.ack <= 1'b1;
      end
    end
  end
endmodule
