// mib_mem_pointer - Sample address pointer and memory-full policy.
//
// A 24-bit byte address (low two bits always 0) that places Sample words
// one after another in local memory and always points at the next free
// location. A word waiting in the pipeline holding register (w_valid) is
// passed to the memory arbiter as a store request at the pointer; when the
// arbiter reports st_done the pointer advances by one word and the word is
// released (w_accept).
//
// At the last word (byte address FFFFFC) the mode bit NOWRAP decides:
//  * simple buffer (NOWRAP = 1): memfull is set and the pointer stays put;
//    further stores are disabled. With DROP = 1 new words are accepted and
//    thrown away, so the FIFO keeps draining; with DROP = 0 they wait, and
//    the FIFO backs up to the MultiKron.
//  * circular buffer (NOWRAP = 0): the pointer wraps to 0 and memfull is
//    set to show that a wraparound happened; storing continues over the
//    oldest data.
// Words marked force (manual MANSW transfer) are stored whatever the state.
//
// The CPU reads the pointer at any time. A pointer write while Samples are
// being stored (LOCAL and MEMW both set, or smwreq) is refused with a bus
// error, which protects the stored Samples; otherwise it loads the pointer
// and clears memfull. Requests are answered one clock later. Holding the
// pointer at the last word, clearing memfull on a write and the exact
// interlock condition are this design's choices.
module mib_mem_pointer
  import mib_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mib_ctrl_t            ctrl,
  input  logic                 smwreq,
  // word from the holding register
  input  logic                 w_valid,
  input  logic [31:0]          w_data,
  input  logic                 w_force,
  output logic                 w_accept,
  // store request to the arbiter
  output logic                 st_req,
  output logic [ADDR_BITS-3:0] st_addr,
  output logic [31:0]          st_data,
  input  logic                 st_done,
  output logic                 memfull,
  // register bus
  input  mib_breq_t            breq,
  output mib_brsp_t            rsp
);
  localparam int unsigned WB = ADDR_BITS - 2;

  logic [WB-1:0] ptr;
  logic          stopped, discard;

  assign stopped  = memfull && ctrl.nowrap;
  assign discard  = w_valid && stopped && !w_force && ctrl.drop;
  assign st_req   = w_valid && (!stopped || w_force);
  assign st_addr  = ptr;
  assign st_data  = w_data;
  assign w_accept = st_done || discard;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr     <= '0;
      memfull <= 1'b0;
      rsp     <= BRSP_IDLE;
    end else begin
      rsp <= BRSP_IDLE;
      if (st_done) begin
        if (ptr == '1) begin
          memfull <= 1'b1;
          if (!ctrl.nowrap) ptr <= '0;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
      if (breq.req && breq.op == OP_PTR_RD) begin
        rsp.ack   <= 1'b1;
        rsp.rdata <= 32'({ptr, 2'b00});
      end
      if (breq.req && breq.op == OP_PTR_WR) begin
        if ((ctrl.local_ && ctrl.memw) || smwreq) begin
          rsp.err <= 1'b1;
        end else begin
          ptr     <= breq.wdata[ADDR_BITS-1:2];
          memfull <= 1'b0;
          rsp.ack <= 1'b1;
        end
      end
    end
  end

  a_done_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    st_done |-> st_req);
endmodule
