// accumulator: the inner code of SCPPM ahead of the PPM mapping, a rate-1
// accumulator 1/(1+D). Each output bit is the XOR of the input bit and the
// previous output bit; the running value starts from 0 at the first bit of
// every codeword, so codewords stay independent.
//
// Interface: valid/ready streams of bit_beat_t, flags and rate passed on; one
// register stage, one bit per clock. The block follows the document's waveform
// diagram; the 1/(1+D) form and the per-codeword reset are this design's
// reading of an accumulator in the SCPPM code.
module accumulator
  import scppm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  bit_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output bit_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  logic acc;   // previous output bit of this codeword
  logic fire;
  logic nxt;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_ready && in_valid;
  assign nxt      = in.b ^ (in.first ? 1'b0 : acc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out       <= in;
        out.b     <= nxt;
        acc       <= nxt;
      end
    end
  end

endmodule
