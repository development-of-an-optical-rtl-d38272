// randomizer: XORs each information block with a pseudo-random sequence so
// that the transmitted data has enough transitions whatever the source sends.
//
// The sequence is the CCSDS pseudo-randomizer sequence, x^8 + x^7 + x^5 + x^3 + 1,
// restarted from the all-ones state at the first bit of every block; it begins
// FF 48 0E C0 hex. The choice of this sequence is this design's own; the
// document only names the block. Interface: valid/ready streams of bit_beat_t,
// flags and rate passed along; one register stage, one bit per clock.
module randomizer
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

  logic [7:0] lfsr;  // lfsr[0] is the next sequence bit
  logic [7:0] state; // state used for this bit
  logic       fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_ready && in_valid;
  assign state    = in.first ? 8'hFF : lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= 8'hFF;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out       <= in;
        out.b     <= in.b ^ state[0];
        lfsr      <= {state[7] ^ state[5] ^ state[3] ^ state[0], state[7:1]};
      end
    end
  end

endmodule
