// convolutional_encoder: the outer code of SCPPM, a rate 1/3, memory-2
// convolutional code punctured to rate 1/2 or 2/3.
//
// For input bit u_k with state (u_k-1, u_k-2), cleared at each block's first
// bit, the three code bits are c0 = u_k ^ u_k-2, c1 = c2 = u_k ^ u_k-1 ^ u_k-2
// (generators 5, 7, 7 octal). Puncturing keeps, over each pair of input bits:
//   rate 1/3: c0 c1 c2 | c0 c1 c2      rate 1/2: c0 c1 | c0 c2
//   rate 2/3: c0 c1    | c0
// so that every block becomes exactly 15120 code bits. The kept bits of one
// input bit are sent one per clock; the next input bit is taken once the last
// of them leaves, so the output runs at one bit per clock. first marks the
// first code bit of a block, last the final one; the rate tag is passed on.
// Interface: valid/ready streams of bit_beat_t. The code rates and the
// 15120-bit codeword follow the document; the generators are those of the
// SCPPM code it cites, and the puncturing patterns are this design's choice.
module convolutional_encoder
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

  logic [1:0] sr;        // sr[0] = u_k-1, sr[1] = u_k-2
  logic       odd;       // input bit has odd index within the block
  logic [2:0] pend;      // code bits still to send, pend[0] next
  logic [2:0] pend_keep; // which of pend are kept
  logic       pend_first;
  logic       pend_last;
  rate_e      pend_rate;
  logic       pend_sent_first;

  // Current symbol being sent from the holding register.
  logic       have;      // holding register not empty
  logic       adv;
  logic       take;      // take a new input bit this cycle

  // code bits and keep mask of the incoming bit
  logic [1:0] s_in;
  logic       odd_in;
  logic [2:0] code;
  logic [2:0] keep;

  assign have = |pend_keep;
  assign adv  = !out_valid || out_ready;

  // After sending, the holding register is empty if this was its last kept bit.
  logic [2:0] keep_after;  // keep mask once the next bit is sent
  logic [2:0] pend_after;
  always_comb begin
    keep_after = pend_keep;
    pend_after = pend;
    // drop positions up to and including the lowest kept one
    if (pend_keep[0])      begin keep_after = {1'b0, pend_keep[2:1]}; pend_after = {1'b0, pend[2:1]}; end
    else if (pend_keep[1]) begin keep_after = {2'b0, pend_keep[2]};   pend_after = {2'b0, pend[2]};   end
    else                   begin keep_after = 3'b000;                 pend_after = 3'b000;            end
  end

  logic sent_bit;
  assign sent_bit = pend_keep[0] ? pend[0] : (pend_keep[1] ? pend[1] : pend[2]);

  assign in_ready = adv && (!have || keep_after == 3'b000);
  assign take     = in_ready && in_valid;

  always_comb begin
    s_in   = in.first ? 2'b00 : sr;
    odd_in = in.first ? 1'b0 : odd;
    code[0] = in.b ^ s_in[1];
    code[1] = in.b ^ s_in[0] ^ s_in[1];
    code[2] = code[1];
    case (in.rate)
      RATE_1_2: keep = odd_in ? 3'b101 : 3'b011;
      RATE_2_3: keep = odd_in ? 3'b001 : 3'b011;
      default:  keep = 3'b111;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr              <= 2'b00;
      odd             <= 1'b0;
      pend            <= '0;
      pend_keep       <= '0;
      pend_first      <= 1'b0;
      pend_last       <= 1'b0;
      pend_rate       <= RATE_1_3;
      pend_sent_first <= 1'b0;
      out_valid       <= 1'b0;
      out             <= '0;
    end else begin
      if (out_valid && out_ready && !(adv && have)) out_valid <= 1'b0;
      if (adv && have) begin
        out_valid       <= 1'b1;
        out.b           <= sent_bit;
        out.first       <= pend_first && !pend_sent_first;
        out.last        <= pend_last && keep_after == 3'b000;
        out.rate        <= pend_rate;
        pend            <= pend_after;
        pend_keep       <= keep_after;
        pend_sent_first <= 1'b1;
      end
      if (take) begin
        sr              <= {s_in[0], in.b};
        odd             <= !odd_in;
        pend            <= code;
        pend_keep       <= keep;
        pend_first      <= in.first;
        pend_last       <= in.last;
        pend_rate       <= in.rate;
        pend_sent_first <= 1'b0;
      end
    end
  end

endmodule
