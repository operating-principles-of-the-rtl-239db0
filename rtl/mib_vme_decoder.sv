// mib_vme_decoder - VME slave interface and address/control decoder.
//
// Recognises VME cycles addressed to the board's 32 MB window (A[31:25]
// equal to BASE_ADDR[31:25]; default base 2000_0000 hex), decodes the offset
// according to the board address map into one operation (mib_pkg::mib_op_e)
// and carries out the AS*/DS*/DTACK* handshake of a simple D32 slave. Address
// modifiers, byte lanes and A[1:0] are ignored: every access is a full
// aligned 32-bit word, and block transfers are not supported.
//
// Sequence: AS* and DS* pass through two-flop synchronisers. When both are
// seen asserted and the address decodes, one request cycle (breq.req) goes
// out to the targets and the decoder waits for brsp.ack or brsp.err. It then
// drives read data with vme_data_oe, asserts DTACK* (or BERR* on err) and
// holds it until the master releases DS*. The RESET command, the board
// version read and the N/A offsets are answered here without a request;
// RESET also emits soft_rst for one clock. Offsets that the address map does
// not list, and reads of write-only offsets, get no answer at all, so the
// VME bus timer ends the cycle. The synchronisers, the internal request bus
// and the handling of unlisted offsets are this design's own choices.
module mib_vme_decoder
  import mib_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h2000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // VME side
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  // board side
  output mib_breq_t   breq,
  input  mib_brsp_t   brsp,
  output logic        soft_rst
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_HOLD} state_e;
  state_e state;

  logic [1:0] as_sync, ds_sync;
  logic       as_on, ds_on;
  mib_op_e    dec_op, op_q;
  logic       is_rd_q, err_q;
  logic [31:0] rdata_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_sync <= 2'b00;
      ds_sync <= 2'b00;
    end else begin
      as_sync <= {as_sync[0], ~vme_as_n};
      ds_sync <= {ds_sync[0], ~(&vme_ds_n)};
    end
  end
  assign as_on = as_sync[1];
  assign ds_on = ds_sync[1];

  // Address map decode.
  function automatic mib_op_e decode(input logic [31:0] a, input logic wr);
    logic [24:0] ofs;
    ofs = {a[24:2], 2'b00};
    if (a[31:25] != BASE_ADDR[31:25])     return OP_NONE;
    if (!ofs[24])                         return wr ? OP_MEM_WR : OP_MEM_RD;
    if (ofs[24:9] == OFS_MK_BASE[24:9])   return wr ? OP_MK_WR  : OP_MK_RD;
    if (wr) begin
      unique case (ofs)
        OFS_CTRL:             return OP_CTRL_WR;
        OFS_CNTIN:            return OP_CNT_WR;
        OFS_PTR_W:            return OP_PTR_WR;
        OFS_HIIN:             return OP_HIIN_WR;
        OFS_FPULSE:           return OP_FPULSE;
        OFS_RESET:            return OP_RESET;
        OFS_W_NA0, OFS_W_NA1: return OP_NA;
        default:              return OP_NONE;
      endcase
    end else begin
      unique case (ofs)
        OFS_STATUS:           return OP_STATUS_RD;
        OFS_FIFOTEST:         return OP_FQ_RD;
        OFS_PTR_R:            return OP_PTR_RD;
        OFS_HIOUT:            return OP_HIOUT_RD;
        OFS_VERSION:          return OP_VER_RD;
        OFS_R_NA0, OFS_R_NA1: return OP_NA;
        default:              return OP_NONE;
      endcase
    end
  endfunction

  assign dec_op = decode(vme_addr, ~vme_write_n);

  function automatic logic is_local(input mib_op_e op);
    return (op == OP_RESET) || (op == OP_VER_RD) || (op == OP_NA);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      op_q     <= OP_NONE;
      is_rd_q  <= 1'b0;
      err_q    <= 1'b0;
      rdata_q  <= '0;
      breq     <= '0;
      soft_rst <= 1'b0;
    end else begin
      breq.req <= 1'b0;
      soft_rst <= 1'b0;
      unique case (state)
        S_IDLE: if (as_on && ds_on && dec_op != OP_NONE) begin
          op_q        <= dec_op;
          is_rd_q     <= vme_write_n;
          err_q       <= 1'b0;
          rdata_q     <= '0;
          breq.req    <= !is_local(dec_op);
          breq.op     <= dec_op;
          breq.waddr  <= vme_addr[23:2];
          breq.wdata  <= vme_wdata;
          state       <= S_WAIT;
        end
        S_WAIT: begin
          if (is_local(op_q)) begin
            rdata_q  <= (op_q == OP_VER_RD) ? {24'h0, BOARD_VERSION} : 32'h0;
            soft_rst <= (op_q == OP_RESET);
            state    <= S_HOLD;
          end else if (brsp.ack || brsp.err) begin
            rdata_q <= brsp.rdata;
            err_q   <= brsp.err;
            state   <= S_HOLD;
          end
        end
        S_HOLD: if (!ds_on) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign vme_dtack_n = !(state == S_HOLD && !err_q);
  assign vme_berr_n  = !(state == S_HOLD &&  err_q);
  assign vme_data_oe = (state == S_HOLD) && is_rd_q;
  assign vme_rdata   = vme_data_oe ? rdata_q : 32'h0;

  // A target must not answer while no request is outstanding.
  a_no_stray_ack: assert property (@(posedge clk) disable iff (!rst_n)
    (brsp.ack || brsp.err) |-> state == S_WAIT);
endmodule
