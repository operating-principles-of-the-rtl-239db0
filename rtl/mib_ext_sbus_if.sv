// mib_ext_sbus_if - external Sample interface toward the SBus collection card.
//
// When Samples are collected on another computer, pairs of FIFO data bytes
// are joined into 16-bit words (first byte in bits 15:8) and sent over the
// external cable. A finished word sits in the output register with ext_valid
// high until the receiver raises ext_ready; the next pair can be gathered in
// the meantime, and in_ready only drops when a second byte arrives while the
// output register is still full. Bytes arrive at most at the 10 MHz read
// rate, so the cable carries at most 5 M words/s. The byte order and the
// valid/ready cable handshake are this design's choices: the receiving
// card's own protocol is outside this design.
module mib_ext_sbus_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  output logic        in_ready,
  output logic [15:0] ext_data,
  output logic        ext_valid,
  input  logic        ext_ready
);
  logic       have_hi;
  logic [7:0] hi;

  assign in_ready = !(have_hi && ext_valid && !ext_ready);

  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      have_hi   <= 1'b0;
      hi        <= '0;
      ext_data  <= '0;
      ext_valid <= 1'b0;
    end else begin
      if (ext_ready) ext_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (have_hi) begin
          ext_data  <= {hi, in_byte};
          ext_valid <= 1'b1;
          have_hi   <= 1'b0;
        end else begin
          hi      <= in_byte;
          have_hi <= 1'b1;
        end
      end
    end
  end
endmodule
