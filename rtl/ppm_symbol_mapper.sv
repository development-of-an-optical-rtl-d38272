// ppm_symbol_mapper: turns the bit stream into PPM symbols. Each group of
// log2(M) bits, first bit most significant, becomes one symbol value 0..M-1.
// After this block the waveform handles symbols instead of bits, which lets any
// PPM order go with any code rate.
//
// The PPM order is sampled from the configuration at the first bit of each
// codeword and held for the whole codeword; 15120 is a multiple of every
// log2(M) from 2 to 8, so codewords end on a symbol boundary. The symbol
// carries its order in log2m and is marked first when it opens a codeword.
// Interface: bit_beat_t stream in (one bit per clock), sym_beat_t stream out;
// a symbol leaves one clock after its last bit arrives. The mapping follows the
// document; the bit order and the per-codeword sampling are this design's.
module ppm_symbol_mapper
  import scppm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] log2m_cfg,
  input  bit_beat_t  in,
  input  logic       in_valid,
  output logic       in_ready,
  output sym_beat_t  out,
  output logic       out_valid,
  input  logic       out_ready
);

  logic [7:0] acc;       // bits of the symbol being collected
  logic [3:0] nbits;     // bits collected so far
  logic [3:0] cw_log2m;  // order of the current codeword
  logic       cw_first;  // the symbol being collected opens a codeword
  logic [3:0] cur_log2m;
  logic [7:0] acc_nxt;
  logic       done;
  logic       fire;

  assign cur_log2m = in.first ? log2m_cfg : cw_log2m;
  assign acc_nxt   = {acc[6:0], in.b};
  assign done      = (nbits + 4'd1 == cur_log2m);
  // a bit that completes a symbol needs room in the output register
  assign in_ready  = !out_valid || out_ready || !done;
  assign fire      = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      nbits     <= '0;
      cw_log2m  <= 4'd4;
      cw_first  <= 1'b0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (in.first) begin
          cw_log2m <= log2m_cfg;
        end
        if (done) begin
          out_valid <= 1'b1;
          out       <= '{sym: acc_nxt & ((8'd1 << cur_log2m) - 8'd1), log2m: cur_log2m,
                         first: in.first ? (cur_log2m == 4'd1) : cw_first, csm: 1'b0};
          nbits     <= '0;
          acc       <= '0;
          cw_first  <= 1'b0;
        end else begin
          acc      <= acc_nxt;
          nbits    <= in.first ? 4'd1 : nbits + 4'd1;
          if (in.first) cw_first <= 1'b1;
        end
      end
    end
  end

endmodule
