// mib_local_mem - the 16 MB local Sample memory, four banks of 1M x 32.
//
// The top two word-address bits select the bank and the remaining twenty
// the word within it. A write (en and we) stores wdata at the end of the
// clock; a read (en without we) returns the word on rdata one clock later,
// and rdata holds until the next read. On the board the banks are DRAM
// behind a commercial controller that hides refresh; here each bank is a
// synchronous array, so refresh does not appear and the access time is one
// clock. Size and banking follow the board; the timing is this design's.
module mib_local_mem #(
  parameter int unsigned BANK_WORDS = 1048576,
  parameter int unsigned BANKS      = 4,
  localparam int unsigned BW = $clog2(BANK_WORDS),
  localparam int unsigned SB = (BANKS > 1) ? $clog2(BANKS) : 1,
  localparam int unsigned AW = BW + ((BANKS > 1) ? $clog2(BANKS) : 0)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] bank_q [BANKS];
  logic [SB-1:0] sel, sel_q;

  assign sel = (BANKS > 1) ? SB'(addr >> BW) : '0;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [31:0] mem [BANK_WORDS];
    logic [31:0] q;
    always_ff @(posedge clk) begin
      if (en && sel == SB'(b)) begin
        if (we) mem[addr[BW-1:0]] <= wdata;
        else    q                  <= mem[addr[BW-1:0]];
      end
    end
    assign bank_q[b] = q;
  end

  always_ff @(posedge clk) begin
    if (en && !we) sel_q <= sel;
  end
  assign rdata = bank_q[sel_q];
endmodule
