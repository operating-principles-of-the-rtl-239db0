// mib_status_reg - the read-only MIB Status register.
//
// Collects the board's seventeen status lines into one 32-bit word, sampled
// when the CPU reads the status address and returned one clock later:
//   [7:0]   TST     MultiKron test output (TEST2 mode)
//   [9]     EFB     0 = FIFO empty
//   [10]    FFB     0 = FIFO full
//   [11]    NETRDY  network ready toward the MultiKron
//   [15:12] WSB     index of the next byte of the word being packed (0 = MSB)
//   [19]    SMWREQ  Sample transfer to local memory in progress
//   [21]    MEMFULL local memory filled (simple buffer) or wrapped (circular)
// All other bits read 0. The bit positions are the board's.
module mib_status_reg
  import mib_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mib_breq_t  breq,
  output mib_brsp_t  rsp,
  input  logic [7:0] tst,
  input  logic       efb,
  input  logic       ffb,
  input  logic       netrdy,
  input  logic [3:0] wsb,
  input  logic       smwreq,
  input  logic       memfull
);
  logic [31:0] status;

  always_comb begin
    status        = '0;
    status[7:0]   = tst;
    status[9]     = efb;
    status[10]    = ffb;
    status[11]    = netrdy;
    status[15:12] = wsb;
    status[19]    = smwreq;
    status[21]    = memfull;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rsp <= BRSP_IDLE;
    else begin
      rsp <= BRSP_IDLE;
      if (breq.req && breq.op == OP_STATUS_RD) begin
        rsp.ack   <= 1'b1;
        rsp.rdata <= status;
      end
    end
  end
endmodule
