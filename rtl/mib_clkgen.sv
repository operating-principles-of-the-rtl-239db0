// mib_clkgen - clock enables and reset for the MultiKron interface board.
//
// The board runs from one 40 MHz oscillator and derives every other clock
// from it. Here the derived clocks are clock enables of the 40 MHz clock:
// ce20 is high every second cycle (the 20 MHz FIFO write / local-memory read
// rate) and ce10 every fourth cycle (the 10 MHz rate of the external cable).
// ce10 always coincides with a ce20 cycle. VME SYSRESET* is asserted
// asynchronously and released through a two-flop synchroniser; both enables
// restart their phase when reset is released. Using enables rather than
// separate clocks, and the synchroniser, are this design's choices.
module mib_clkgen (
  input  logic clk,          // 40 MHz
  input  logic sysreset_n,   // VME SYSRESET*, asynchronous
  output logic rst_n,        // synchronous board reset, active low
  output logic ce20,         // 20 MHz enable
  output logic ce10          // 10 MHz enable
);
  logic [1:0] sync;
  logic [1:0] div;

  always_ff @(posedge clk or negedge sysreset_n) begin
    if (!sysreset_n) sync <= 2'b00;
    else             sync <= {sync[0], 1'b1};
  end
  assign rst_n = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) div <= 2'd0;
    else        div <= div + 2'd1;
  end

  assign ce20 = rst_n && (div[0] == 1'b1);
  assign ce10 = rst_n && (div == 2'd3);
endmodule
