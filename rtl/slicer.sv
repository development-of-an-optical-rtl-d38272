// slicer: cuts the continuous stream of marked transfer frames into the
// information blocks of the SCPPM code. A block holds 15120*r - 34 bits for
// code rate r (5006, 7526 or 10046 bits), so that the CRC-32 and the two
// termination bits added next fill the encoder input of 15120*r bits.
//
// The code rate is sampled from the configuration when a block's first bit
// passes and travels with every bit of that block in the rate field, so a rate
// change written at any time takes effect cleanly on the next block. The first
// and last fields mark the block. Interface: valid/ready streams of bit_beat_t;
// one register stage, one bit per clock. The block sizes follow from the
// document's 15120-bit codeword and code rates; the tagging is this design's.
module slicer
  import scppm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rate_e     rate_cfg,
  input  bit_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output bit_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  logic [13:0] cnt;       // bits of the current block already sent
  rate_e       blk_rate;  // rate of the current block
  rate_e       cur_rate;
  logic        fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_ready && in_valid;
  assign cur_rate = (cnt == 14'd0) ? rate_cfg : blk_rate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      blk_rate  <= RATE_1_3;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out.b     <= in.b;
        out.first <= (cnt == 14'd0);
        out.last  <= (32'(cnt) == info_bits(cur_rate) - 1);
        out.rate  <= cur_rate;
        blk_rate  <= cur_rate;
        cnt       <= (32'(cnt) == info_bits(cur_rate) - 1) ? 14'd0 : cnt + 14'd1;
      end
    end
  end

endmodule
