// data_generation: the waveform's test data source. It produces an endless
// bit-serial stream from one of three sources chosen by cfg.src: a PRBS 2^23-1
// (x^23 + x^18 + 1, the sequence leaves the generator one bit per beat), a
// constant byte repeated, or an 8-bit counter that counts up once per byte.
// Bytes are sent most significant bit first.
//
// Interface: out/out_valid/out_ready, a valid/ready stream of bit_beat_t
// (only field b is meaningful here). The stream runs while enable is high and
// stalls with backpressure; one bit per clock at most. The three sources follow
// the document; the PRBS polynomial, its all-ones seed and the bit order are
// this design's own choices.
module data_generation
  import scppm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,
  input  src_e      src,
  input  logic [7:0] const_byte,
  output bit_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  logic [22:0] prbs;     // prbs[22] is the next output bit
  logic [7:0]  count;
  logic [2:0]  bit_idx;  // bit of the current byte, 7 first
  logic        take;
  logic        nxt;

  assign take = enable && (!out_valid || out_ready);

  always_comb begin
    case (src)
      SRC_CONST: nxt = const_byte[bit_idx];
      SRC_COUNT: nxt = count[bit_idx];
      default:   nxt = prbs[22];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prbs      <= '1;
      count     <= 8'd0;
      bit_idx   <= 3'd7;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !take) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out       <= '{b: nxt, first: 1'b0, last: 1'b0, rate: RATE_1_3};
        if (src == SRC_PRBS23) prbs <= {prbs[21:0], prbs[22] ^ prbs[17]};
        bit_idx <= bit_idx - 3'd1;
        if (bit_idx == 3'd0) count <= count + 8'd1;
      end
    end
  end

endmodule
