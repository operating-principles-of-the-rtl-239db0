// mib_mk_bus_if - MultiKron data bus interface with the high-order registers.
//
// The VME path is 32 bits wide while the MultiKron moves up to 64 bits, so
// two holding registers widen it:
//  * the 16-bit high-order input register (written at its own address from
//    VME D[15:0]) drives MultiKron data bits 47:32 on every MultiKron write,
//    whose bits 31:0 come from the VME cycle; bits 63:48 are driven 0. The
//    register is not cleared after use.
//  * the 32-bit high-order output register is loaded with MultiKron data
//    bits 63:32 on every MultiKron read, whose bits 31:0 go to the VME bus;
//    it is read back at its own address.
// No locking joins the two halves: software must keep them indivisible.
//
// A MultiKron access (OP_MK_RD / OP_MK_WR) holds mk_cs (with mk_we, mk_addr
// = VME word offset [6:0] and mk_wdata) until the chip returns mk_ready,
// which is how its wait states and a full internal FIFO stall the VME cycle;
// the request is then acknowledged on the next clock. Register accesses
// answer one clock after the request. mk_reset is high during board reset
// and for MK_RESET_CYCLES clocks after the RESET command. The cs/ready
// handshake and the reset pulse length are this design's choices.
module mib_mk_bus_if
  import mib_pkg::*;
#(
  parameter int unsigned MK_RESET_CYCLES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  mib_breq_t   breq,
  output mib_brsp_t   rsp,
  // MultiKron pins
  output logic [6:0]  mk_addr,
  output logic [63:0] mk_wdata,
  output logic        mk_cs,
  output logic        mk_we,
  input  logic [63:0] mk_rdata,
  input  logic        mk_ready,
  output logic        mk_reset
);
  logic [15:0] hi_in;
  logic [31:0] hi_out;
  logic [31:0] lo_wdata;
  logic [$clog2(MK_RESET_CYCLES+1)-1:0] rst_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hi_in    <= '0;
      hi_out   <= '0;
      lo_wdata <= '0;
      mk_cs    <= 1'b0;
      mk_we    <= 1'b0;
      mk_addr  <= '0;
      rsp      <= BRSP_IDLE;
    end else begin
      rsp <= BRSP_IDLE;
      if (breq.req) begin
        unique case (breq.op)
          OP_HIIN_WR: begin
            hi_in   <= breq.wdata[15:0];
            rsp.ack <= 1'b1;
          end
          OP_HIOUT_RD: begin
            rsp.ack   <= 1'b1;
            rsp.rdata <= hi_out;
          end
          OP_MK_WR, OP_MK_RD: begin
            mk_cs    <= 1'b1;
            mk_we    <= (breq.op == OP_MK_WR);
            mk_addr  <= breq.waddr[6:0];
            lo_wdata <= breq.wdata;
          end
          default: ;
        endcase
      end
      if (mk_cs && mk_ready) begin
        mk_cs   <= 1'b0;
        mk_we   <= 1'b0;
        rsp.ack <= 1'b1;
        if (!mk_we) begin
          hi_out    <= mk_rdata[63:32];
          rsp.rdata <= mk_rdata[31:0];
        end
      end
    end
  end

  assign mk_wdata = {16'h0, hi_in, lo_wdata};

  always_ff @(posedge clk) begin
    if (!rst_n)        rst_cnt <= ($bits(rst_cnt))'(MK_RESET_CYCLES);
    else if (soft_rst) rst_cnt <= ($bits(rst_cnt))'(MK_RESET_CYCLES);
    else if (rst_cnt != 0) rst_cnt <= rst_cnt - 1'b1;
  end
  assign mk_reset = !rst_n || (rst_cnt != 0);
endmodule
