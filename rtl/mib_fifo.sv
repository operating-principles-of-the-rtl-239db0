// mib_fifo - the board's Sample FIFO, 16 bits wide by 1024 entries.
//
// Buffers MultiKron output network transfers (one byte plus end-of-Sample
// flag and parity per entry, 64 Trace Samples of 16 bytes) ahead of the
// local memory or the external cable. Write and read sides run on clock
// enables of the one board clock, so the FIFO is written here as a
// single-clock circular buffer with first-word fall-through: rdata always
// shows the oldest entry while empty is low, and rd_en removes it. A write
// to a full FIFO or a read of an empty one is ignored. clr empties it in one
// clock (used by the RESET command). The single clock, fall-through read and
// clear are this design's choices; width and depth are the board's.
module mib_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end
endmodule
