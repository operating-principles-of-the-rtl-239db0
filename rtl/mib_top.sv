// mib_top - the VME MultiKron interface board.
//
// Lets a computer with a VME bus use the MultiKron performance measurement
// chip and collect its measurement Samples. The board is a VME slave in a
// 32 MB window; through it the CPU writes and reads the MultiKron (32-bit
// VME words widened to the chip's 48-bit input and 64-bit output by two
// high-order holding registers), sets up the board in a Control register
// and a Counter Input register, and reads status and the collected Samples.
//
// Samples leave the MultiKron as bytes on its output network and enter a
// 1024 x 16 FIFO at up to 20 MHz. From there they go either
//  * to local memory (LOCAL = 1, MEMW = 1): four bytes are packed into a
//    32-bit word, held in a pipeline register and stored at the Sample
//    address pointer through the memory arbiter, which also serves CPU reads
//    of the 16 MB memory; the pointer stops (simple buffer, optionally
//    discarding with DROP) or wraps (circular buffer) at the end; or
//  * to the external cable (LOCAL = 0): byte pairs become 16-bit words for a
//    collection computer, at the 10 MHz read rate.
// Test features let the CPU pass single bytes into the FIFO (SPM/FPULSE),
// pull single entries out (MANPUL) or force four entries into memory
// (MANSW). The CPU ID and resource counter inputs of the MultiKron come from
// board registers or from external connectors.
//
// Everything runs on the 40 MHz clock `clk`; the 20 and 10 MHz rates are
// clock enables, and mk_ce20 tells the MultiKron on which cycles it may
// move a network byte. Internally the VME decoder sends one request per VME
// cycle to the block that owns the address; responses are ORed back. The
// MultiKron's bus, network and control pins are ports, as are the connector
// inputs and the external cable.
module mib_top
  import mib_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR       = 32'h2000_0000,
  parameter int unsigned FIFO_DEPTH      = 1024,
  parameter int unsigned BANK_WORDS      = 1048576,
  parameter int unsigned BANKS           = 4,
  parameter int unsigned MK_RESET_CYCLES = 8
) (
  input  logic        clk,             // 40 MHz
  input  logic        vme_sysreset_n,
  // VME slave
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        vme_data_oe,
  output logic        vme_dtack_n,
  output logic        vme_berr_n,
  // MultiKron bus
  output logic [6:0]  mk_addr,
  output logic [63:0] mk_wdata,
  output logic        mk_cs,
  output logic        mk_we,
  input  logic [63:0] mk_rdata,
  input  logic        mk_ready,
  output logic        mk_reset,
  // MultiKron control lines and inputs
  output logic [1:0]  mk_wait,
  output logic        mk_notestb,
  output logic        mk_test2,
  output logic        mk_outen,
  input  logic [7:0]  mk_tst,
  output logic [7:0]  mk_cpuid,
  output logic [15:0] mk_rc,
  output logic        mk_ce20,
  // MultiKron output network
  input  logic        net_valid,
  input  logic [9:0]  net_data,
  output logic        netrdy,
  // external connectors
  input  logic [7:0]  xcpu,
  input  logic [15:0] xrc,
  // external Sample cable
  output logic [15:0] ext_data,
  output logic        ext_valid,
  input  logic        ext_ready
);
  localparam int unsigned WB = $clog2(BANK_WORDS) + ((BANKS > 1) ? $clog2(BANKS) : 0);

  logic        rst_n, ce20, ce10, soft_rst;
  mib_breq_t   breq;
  mib_brsp_t   brsp, rsp_ctrl, rsp_mk, rsp_net, rsp_fq, rsp_ptr, rsp_mem, rsp_stat;
  mib_ctrl_t   ctrl;
  logic [15:0] irc;
  logic        manpul_rise, mansw_rise;

  logic        fifo_we, fifo_rd, fifo_empty, fifo_full;
  logic [15:0] fifo_wdata, fifo_rdata;

  logic        pk_valid, pk_force, pk_ready, ex_valid, ex_ready;
  logic [7:0]  pk_byte, ex_byte;
  logic        w_valid, w_force, w_accept, smwreq, memfull;
  logic [31:0] w_data;
  logic [3:0]  wsb;
  logic        st_req, st_done;
  logic [WB-1:0] st_addr, m_addr;
  logic [31:0] st_data, m_wdata, m_rdata;
  logic        m_en, m_we;

  mib_clkgen u_clk (.clk, .sysreset_n(vme_sysreset_n), .rst_n, .ce20, .ce10);

  mib_vme_decoder #(.BASE_ADDR(BASE_ADDR)) u_dec (
    .clk, .rst_n, .vme_as_n, .vme_ds_n, .vme_write_n, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_data_oe, .vme_dtack_n, .vme_berr_n, .breq, .brsp, .soft_rst);

  assign brsp = mib_brsp_t'(rsp_ctrl | rsp_mk | rsp_net | rsp_fq | rsp_ptr | rsp_mem | rsp_stat);

  mib_control_reg u_ctrl (
    .clk, .rst_n, .breq, .rsp(rsp_ctrl), .ctrl, .irc, .manpul_rise, .mansw_rise);

  mib_mk_bus_if #(.MK_RESET_CYCLES(MK_RESET_CYCLES)) u_mk (
    .clk, .rst_n, .soft_rst, .breq, .rsp(rsp_mk), .mk_addr, .mk_wdata, .mk_cs, .mk_we,
    .mk_rdata, .mk_ready, .mk_reset);

  mib_mux2 #(.WIDTH(8))  u_cpu_mux (.a(ctrl.icpu), .b(xcpu), .sel(ctrl.ext_cpu), .y(mk_cpuid));
  mib_mux2 #(.WIDTH(16)) u_rc_mux  (.a(irc),       .b(xrc),  .sel(ctrl.ext_rsc), .y(mk_rc));

  assign mk_wait    = ctrl.wait_st;
  assign mk_notestb = ctrl.notestb;
  assign mk_test2   = ctrl.test2;
  assign mk_outen   = ctrl.outen;
  assign mk_ce20    = ce20;

  mib_net_if u_net (
    .clk, .rst_n, .soft_rst, .ce20, .spm(ctrl.spm), .breq, .rsp(rsp_net),
    .net_valid, .net_data, .netrdy, .fifo_full, .fifo_we, .fifo_wdata);

  mib_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .clr(soft_rst), .wr_en(fifo_we), .wdata(fifo_wdata), .rd_en(fifo_rd),
    .rdata(fifo_rdata), .empty(fifo_empty), .full(fifo_full), .count());

  mib_fifo_reader u_rd (
    .clk, .rst_n, .soft_rst, .ce20, .ce10, .ctrl, .manpul_rise, .mansw_rise,
    .fifo_empty, .fifo_rdata, .fifo_rd, .pk_valid, .pk_byte, .pk_force, .pk_ready,
    .ex_valid, .ex_byte, .ex_ready, .breq, .rsp(rsp_fq), .fq());

  mib_sample_packer u_pack (
    .clk, .rst_n, .soft_rst, .in_valid(pk_valid), .in_byte(pk_byte), .in_force(pk_force),
    .in_ready(pk_ready), .w_valid, .w_data, .w_force, .w_accept, .wsb, .smwreq);

  mib_ext_sbus_if u_ext (
    .clk, .rst_n, .soft_rst, .in_valid(ex_valid), .in_byte(ex_byte), .in_ready(ex_ready),
    .ext_data, .ext_valid, .ext_ready);

  mib_mem_pointer #(.ADDR_BITS(WB + 2)) u_ptr (
    .clk, .rst_n, .ctrl, .smwreq, .w_valid, .w_data, .w_force, .w_accept,
    .st_req, .st_addr, .st_data, .st_done, .memfull, .breq, .rsp(rsp_ptr));

  mib_mem_arbiter #(.WB(WB)) u_arb (
    .clk, .rst_n, .st_req, .st_addr, .st_data, .st_done, .breq, .rsp(rsp_mem),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata);

  mib_local_mem #(.BANK_WORDS(BANK_WORDS), .BANKS(BANKS)) u_mem (
    .clk, .en(m_en), .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata));

  mib_status_reg u_stat (
    .clk, .rst_n, .breq, .rsp(rsp_stat), .tst(mk_tst), .efb(!fifo_empty), .ffb(!fifo_full),
    .netrdy, .wsb, .smwreq, .memfull);
endmodule
