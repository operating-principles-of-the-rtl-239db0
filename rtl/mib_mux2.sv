// mib_mux2 - 2-to-1 source selector for MultiKron input lines.
//
// The board can drive the MultiKron CPU ID lines (8 bits) and resource
// counter external inputs (16 bits) either from its own registers or from an
// external connector. One instance per bundle; sel = 1 takes the connector
// (EXT_CPU / EXT_RSC = 1), sel = 0 the register. Purely combinational.
module mib_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,    // register source
  input  logic [WIDTH-1:0] b,    // external connector source
  input  logic             sel,  // 1 = external
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? b : a;
endmodule
