// mib_fifo_reader - FIFO read-side control and the FIFO output test register.
//
// Chooses, each clock, whether the head FIFO entry is removed and where it
// goes. In order of priority:
//  1. MANPUL: after a leading edge of control bit MANPUL, the next entry
//     (as soon as the FIFO holds one) is moved into the 16-bit FIFO output
//     test register, which the CPU reads at the FIFO TEST address (FQ).
//  2. MANSW: after a leading edge of MANSW, the next four entries are sent
//     to the Sample packer at the 20 MHz rate, flagged "force" so that they
//     are stored whether or not storage is enabled or memory has room.
//  3. Local storage (LOCAL = 1, MEMW = 1): entries go to the Sample packer
//     at the 20 MHz rate (ce20) while it is ready.
//  4. External cable (LOCAL = 0): entries go to the external interface at
//     the 10 MHz rate (ce10) while it is ready.
// Only the eight data bits of an entry continue to memory or cable. The
// handshakes are valid/ready with valid raised only when ready is high.
// The priority order is this design's choice; the four paths are the
// board's. The test-register read is acknowledged one clock after it is
// requested.
module mib_fifo_reader
  import mib_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        ce20,
  input  logic        ce10,
  input  mib_ctrl_t   ctrl,
  input  logic        manpul_rise,
  input  logic        mansw_rise,
  // FIFO read side
  input  logic        fifo_empty,
  input  logic [15:0] fifo_rdata,
  output logic        fifo_rd,
  // to the Sample packer
  output logic        pk_valid,
  output logic [7:0]  pk_byte,
  output logic        pk_force,
  input  logic        pk_ready,
  // to the external interface
  output logic        ex_valid,
  output logic [7:0]  ex_byte,
  input  logic        ex_ready,
  // register bus (FIFO TEST read)
  input  mib_breq_t   breq,
  output mib_brsp_t   rsp,
  output logic [15:0] fq
);
  logic       manpul_pend;
  logic [2:0] mansw_left;
  logic       do_manpul, do_mansw, do_local, do_ext;

  always_comb begin
    do_manpul = manpul_pend && !fifo_empty;
    do_mansw  = !do_manpul && (mansw_left != 0) && ce20 && !fifo_empty && pk_ready;
    do_local  = !do_manpul && (mansw_left == 0) && ctrl.local_ && ctrl.memw
                && ce20 && !fifo_empty && pk_ready;
    do_ext    = !do_manpul && (mansw_left == 0) && !ctrl.local_
                && ce10 && !fifo_empty && ex_ready;
  end

  assign fifo_rd  = do_manpul || do_mansw || do_local || do_ext;
  assign pk_valid = do_mansw || do_local;
  assign pk_force = do_mansw;
  assign pk_byte  = fifo_rdata[7:0];
  assign ex_valid = do_ext;
  assign ex_byte  = fifo_rdata[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      manpul_pend <= 1'b0;
      mansw_left  <= '0;
      fq          <= '0;
    end else begin
      if (do_manpul) begin
        fq          <= fifo_rdata;
        manpul_pend <= 1'b0;
      end
      if (manpul_rise) manpul_pend <= 1'b1;
      if (mansw_rise)       mansw_left <= 3'd4;
      else if (do_mansw)    mansw_left <= mansw_left - 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rsp <= BRSP_IDLE;
    else begin
      rsp <= BRSP_IDLE;
      if (breq.req && breq.op == OP_FQ_RD) begin
        rsp.ack   <= 1'b1;
        rsp.rdata <= {16'h0, fq};
      end
    end
  end
endmodule
