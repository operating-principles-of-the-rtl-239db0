// mib_sample_packer - packs FIFO bytes into 32-bit memory words.
//
// Local memory is 32 bits wide while each FIFO entry carries one Sample
// byte, so four consecutive bytes form one memory word, the first byte in
// bits 31:24 and the fourth in bits 7:0. The finished word moves into the
// 32-bit pipeline holding register, where it waits (w_valid) until the
// store path takes it with w_accept; meanwhile the next word can already be
// assembled, and in_ready only drops when a fourth byte arrives while the
// holding register is still full. wsb gives the index of the byte expected
// next (0 = the most significant) and smwreq is high while any byte is on
// its way to memory (word partly assembled or waiting in the holding
// register); both appear in the status register. A word is marked "force"
// if any of its bytes was (manual MANSW transfer). The encoding of wsb and
// the exact meaning of smwreq are this design's reading of the status bits.
module mib_sample_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  logic        in_force,
  output logic        in_ready,
  output logic        w_valid,
  output logic [31:0] w_data,
  output logic        w_force,
  input  logic        w_accept,
  output logic [3:0]  wsb,
  output logic        smwreq
);
  logic [1:0]  idx;
  logic [23:0] part;
  logic        part_force;

  assign in_ready = !(idx == 2'd3 && w_valid && !w_accept);
  assign wsb      = {2'b00, idx};
  assign smwreq   = w_valid || (idx != 2'd0);

  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      idx        <= '0;
      part       <= '0;
      part_force <= 1'b0;
      w_valid    <= 1'b0;
      w_data     <= '0;
      w_force    <= 1'b0;
    end else begin
      if (w_accept) w_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (idx == 2'd3) begin
          w_valid    <= 1'b1;
          w_data     <= {part, in_byte};
          w_force    <= part_force || in_force;
          part_force <= 1'b0;
          idx        <= 2'd0;
        end else begin
          part       <= {part[15:0], in_byte};
          part_force <= part_force || in_force;
          idx        <= idx + 2'd1;
        end
      end
    end
  end

  a_accept_only_valid: assert property (@(posedge clk) disable iff (!rst_n)
    w_accept |-> w_valid);
endmodule
