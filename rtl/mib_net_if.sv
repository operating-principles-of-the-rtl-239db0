// mib_net_if - MultiKron output network receiver and Single Pulse Mode.
//
// The MultiKron sends each Trace Sample as a stream of network transfers of
// ten bits: eight data bits, an end-of-Sample flag and an odd parity bit
// (net_data = {parity, eos, data}). A transfer happens on a 20 MHz enable
// (ce20) cycle in which the MultiKron holds net_valid and the board holds
// netrdy; it is written to the FIFO as {6'b0, parity, eos, data}.
//
// Normal mode (SPM = 0): netrdy is the inverted FIFO full flag, so the
// MultiKron stops sending when the FIFO is full. Single Pulse Mode (SPM = 1):
// the full flag no longer reaches the MultiKron; netrdy stays low except
// that each write to the FPULSE address lets exactly one transfer through.
// A pending pulse still waits while the FIFO is full, so no byte is lost,
// and is forgotten when SPM is cleared. The FPULSE write is acknowledged
// one clock after its request. The bit order of the FIFO entry and the
// valid/ready form of the network handshake are this design's choices.
module mib_net_if
  import mib_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        soft_rst,
  input  logic        ce20,
  input  logic        spm,
  input  mib_breq_t   breq,
  output mib_brsp_t   rsp,
  // MultiKron output network
  input  logic        net_valid,
  input  logic [9:0]  net_data,
  output logic        netrdy,
  // FIFO write side
  input  logic        fifo_full,
  output logic        fifo_we,
  output logic [15:0] fifo_wdata
);
  logic pulse_pending;

  assign netrdy     = spm ? (pulse_pending && !fifo_full) : !fifo_full;
  assign fifo_we    = ce20 && net_valid && netrdy;
  assign fifo_wdata = {6'b0, net_data};

  always_ff @(posedge clk) begin
    if (!rst_n || soft_rst) begin
      pulse_pending <= 1'b0;
      rsp           <= BRSP_IDLE;
    end else begin
      rsp <= BRSP_IDLE;
      if (!spm || fifo_we) pulse_pending <= 1'b0;
      if (breq.req && breq.op == OP_FPULSE) begin
        pulse_pending <= spm;
        rsp.ack       <= 1'b1;
      end
    end
  end
endmodule
