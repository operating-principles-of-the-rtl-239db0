// mib_mem_arbiter - memory arbiter/controller for the local Sample memory.
//
// Two requesters share the one memory port: Sample stores from the address
// pointer (st_req/st_addr/st_data, finished with a one-clock st_done) and
// CPU reads and writes of local memory arriving over the register bus
// (OP_MEM_RD / OP_MEM_WR, word address breq.waddr). The CPU may access the
// memory at any time; when both wait, grants alternate, so neither can be
// shut out. Each access takes three clocks: the command is registered onto
// the memory port (IDLE), the memory performs it (BUSY), and the result is
// reported (DONE: st_done for a store, the ack with read data one clock
// later for a CPU access). At 40 MHz this allows over 13 M words/s, more
// than the 5 M words/s that a 20 MHz byte stream produces. The memory's
// refresh is not modelled. Round-robin order and the three-clock access are
// this design's choices.
module mib_mem_arbiter
  import mib_pkg::*;
#(
  parameter int unsigned WB = 22     // word address bits
) (
  input  logic          clk,
  input  logic          rst_n,
  // Sample store
  input  logic          st_req,
  input  logic [WB-1:0] st_addr,
  input  logic [31:0]   st_data,
  output logic          st_done,
  // CPU access
  input  mib_breq_t     breq,
  output mib_brsp_t     rsp,
  // memory port
  output logic          m_en,
  output logic          m_we,
  output logic [WB-1:0] m_addr,
  output logic [31:0]   m_wdata,
  input  logic [31:0]   m_rdata
);
  typedef enum logic [1:0] {A_IDLE, A_BUSY, A_DONE} astate_e;
  astate_e state;

  logic          v_pend, v_we;
  logic [WB-1:0] v_addr;
  logic [31:0]   v_wdata;
  logic          owner_cpu;   // owner of the access in progress
  logic          last_cpu;    // last grant went to the CPU
  logic          grant_st, grant_cpu;
  logic          m_we_q;

  always_comb begin
    grant_st  = 1'b0;
    grant_cpu = 1'b0;
    if (state == A_IDLE) begin
      if (st_req && v_pend) begin
        grant_cpu = !last_cpu;
        grant_st  = last_cpu;
      end else begin
        grant_st  = st_req;
        grant_cpu = v_pend;
      end
    end
  end

  assign st_done = (state == A_DONE) && !owner_cpu;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      v_pend    <= 1'b0;
      v_we      <= 1'b0;
      v_addr    <= '0;
      v_wdata   <= '0;
      owner_cpu <= 1'b0;
      last_cpu  <= 1'b0;
      m_en      <= 1'b0;
      m_we      <= 1'b0;
      m_addr    <= '0;
      m_wdata   <= '0;
      rsp       <= BRSP_IDLE;
    end else begin
      rsp  <= BRSP_IDLE;
      m_en <= 1'b0;
      m_we <= 1'b0;
      if (breq.req && (breq.op == OP_MEM_RD || breq.op == OP_MEM_WR)) begin
        v_pend  <= 1'b1;
        v_we    <= (breq.op == OP_MEM_WR);
        v_addr  <= breq.waddr[WB-1:0];
        v_wdata <= breq.wdata;
      end
      unique case (state)
        A_IDLE: begin
          if (grant_st) begin
            m_en      <= 1'b1;
            m_we      <= 1'b1;
            m_addr    <= st_addr;
            m_wdata   <= st_data;
            owner_cpu <= 1'b0;
            last_cpu  <= 1'b0;
            state     <= A_BUSY;
          end else if (grant_cpu) begin
            m_en      <= 1'b1;
            m_we      <= v_we;
            m_addr    <= v_addr;
            m_wdata   <= v_wdata;
            owner_cpu <= 1'b1;
            last_cpu  <= 1'b1;
            v_pend    <= 1'b0;
            state     <= A_BUSY;
          end
        end
        A_BUSY: state <= A_DONE;
        A_DONE: begin
          if (owner_cpu) begin
            rsp.ack   <= 1'b1;
            rsp.rdata <= m_we_q ? 32'h0 : m_rdata;
          end
          state <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  // Remember whether the access in progress was a write (for the read data).
  always_ff @(posedge clk) begin
    if (!rst_n)    m_we_q <= 1'b0;
    else if (m_en) m_we_q <= m_we;
  end
endmodule
