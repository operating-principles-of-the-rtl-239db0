// mib_pkg - types and constants shared by the MultiKron interface board (MIB).
//
// The board is a VME A32/D32 slave. Its 32 MB window holds the 16 MB local
// Sample memory, a 128-word window onto the MultiKron chip and a handful of
// write-only and read-only registers. The offsets and register layouts below
// follow the board's published address map and register tables; the internal
// request/response bus (mib_breq_t / mib_brsp_t) is this design's own choice:
// the address decoder issues a one-cycle request carrying a decoded operation,
// and exactly one target answers it with ack (or err) one or more cycles later.
package mib_pkg;

  // Byte offsets inside the board window (bits [24:0] of the VME address).
  localparam logic [24:0] OFS_MK_BASE    = 25'h100_0000;  // ..100_01FC MultiKron
  localparam logic [24:0] OFS_CTRL       = 25'h100_0400;  // W  control register
  localparam logic [24:0] OFS_CNTIN      = 25'h100_0404;  // W  counter input register
  localparam logic [24:0] OFS_W_NA0      = 25'h100_0408;  // W  N/A
  localparam logic [24:0] OFS_W_NA1      = 25'h100_040C;  // W  N/A
  localparam logic [24:0] OFS_PTR_W      = 25'h100_0410;  // W  Sample address pointer
  localparam logic [24:0] OFS_HIIN       = 25'h100_0414;  // W  16-bit high-order input
  localparam logic [24:0] OFS_FPULSE     = 25'h100_0418;  // W  one network transfer
  localparam logic [24:0] OFS_RESET      = 25'h100_041C;  // W  reset board and MultiKron
  localparam logic [24:0] OFS_STATUS     = 25'h100_0500;  // R  status register
  localparam logic [24:0] OFS_FIFOTEST   = 25'h100_0504;  // R  FIFO test register
  localparam logic [24:0] OFS_R_NA0      = 25'h100_0508;  // R  N/A
  localparam logic [24:0] OFS_R_NA1      = 25'h100_050C;  // R  N/A
  localparam logic [24:0] OFS_PTR_R      = 25'h100_0510;  // R  Sample address pointer
  localparam logic [24:0] OFS_HIOUT      = 25'h100_0514;  // R  32-bit high-order output
  localparam logic [24:0] OFS_VERSION    = 25'h100_0518;  // R  board version number

  localparam logic [7:0]  BOARD_VERSION  = 8'h03;
  localparam logic [23:0] CTRL_RECOMMENDED = 24'hD5_0C01;

  // Decoded operation of one VME cycle.
  typedef enum logic [4:0] {
    OP_NONE, OP_MEM_RD, OP_MEM_WR, OP_MK_RD, OP_MK_WR,
    OP_CTRL_WR, OP_CNT_WR, OP_PTR_WR, OP_HIIN_WR, OP_FPULSE, OP_RESET,
    OP_STATUS_RD, OP_FQ_RD, OP_PTR_RD, OP_HIOUT_RD, OP_VER_RD, OP_NA
  } mib_op_e;

  // Internal request: valid for one clock when req is high.
  typedef struct packed {
    logic        req;
    mib_op_e     op;
    logic [21:0] waddr;   // word offset: memory word, or MultiKron word in [6:0]
    logic [31:0] wdata;
  } mib_breq_t;

  // Internal response: targets drive zero when not answering; responses are ORed.
  typedef struct packed {
    logic        ack;
    logic        err;
    logic [31:0] rdata;
  } mib_brsp_t;

  localparam mib_brsp_t BRSP_IDLE = '{ack: 1'b0, err: 1'b0, rdata: 32'h0};

  // MIB Control register, bit 23 first.
  typedef struct packed {
    logic       nowrap;   // 23 1 = simple buffer, 0 = circular buffer
    logic       local_;   // 22 1 = Samples to local memory, 0 = external cable
    logic       spm;      // 21 single pulse mode
    logic       outen;    // 20 MultiKron output enable
    logic       test2;    // 19 MultiKron TEST2 mode
    logic       notestb;  // 18 0 = MultiKron TEST mode
    logic [1:0] wait_st;  // 17:16 MultiKron wait states
    logic [1:0] unused;   // 15:14
    logic       ext_cpu;  // 13 CPU ID from connector
    logic       ext_rsc;  // 12 resource counter inputs from connector
    logic       drop;     // 11 discard Samples when memory full
    logic       memw;     // 10 enable Sample storage to local memory
    logic       mansw;    //  9 move four FIFO entries to memory (leading edge)
    logic       manpul;   //  8 read one FIFO entry to the test register (leading edge)
    logic [7:0] icpu;     //  7:0 CPU ID lines
  } mib_ctrl_t;

  // OR of two responses.
  function automatic mib_brsp_t brsp_or(mib_brsp_t a, mib_brsp_t b);
    return mib_brsp_t'(a | b);
  endfunction

endpackage
