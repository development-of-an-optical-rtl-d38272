// code_interleaver: the bit interleaver between the convolutional encoder and
// the accumulator. It permutes the N code bits of each codeword: output bit j
// is input bit pi(j) = (11*j + 210*j*j) mod N, a quadratic permutation
// polynomial (a permutation because 11 is prime to N = 15120 and 210 holds
// every prime factor of N).
//
// Two banks of N bits work as a ping-pong buffer: one is filled in input order
// while the other, once full, is read out in permuted order, so input and output
// each run at one bit per clock. pi is stepped without a multiplier:
// pi(j+1) = pi(j) + d(j), d(j+1) = d(j) + 420, both mod N, d(0) = 221. The read
// is synchronous (one block RAM read per output bit). Latency: a codeword's
// first bit leaves one clock after its last bit was written. Interface:
// valid/ready streams of bit_beat_t; first and last mark the output codeword,
// the rate tag of the input codeword is kept. The block follows the order of
// the document's waveform diagram; the permutation is this design's choice.
module code_interleaver
  import scppm_pkg::*;
#(
  parameter int unsigned N = CODEWORD_BITS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  bit_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output bit_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  localparam int unsigned AW = $clog2(N);
  localparam logic [AW-1:0] D0   = AW'((11 + 210) % N);
  localparam logic [AW-1:0] DINC = AW'(420 % N);

  logic          mem [2][N];
  logic [1:0]    full;      // bank holds a complete codeword
  rate_e         bank_rate [2];
  logic          wbank, rbank;
  logic [AW-1:0] wcnt, rcnt, perm, delta;
  logic          wfire, rfire;
  logic          rd_bit;     // bit read from the memory
  logic          out_first, out_last;
  rate_e         out_rate;

  function automatic logic [AW-1:0] add_mod(logic [AW-1:0] a, logic [AW-1:0] b);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= (AW+1)'(N)) ? AW'(s - (AW+1)'(N)) : s[AW-1:0];
  endfunction

  assign in_ready = !full[wbank];
  assign wfire    = in_valid && in_ready;
  assign rfire    = full[rbank] && (!out_valid || out_ready);

  // Bit storage: written in order, read at the permuted address.
  always_ff @(posedge clk) begin
    if (wfire) mem[wbank][wcnt] <= in.b;
    if (rfire) rd_bit <= mem[rbank][perm];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full      <= 2'b00;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      perm      <= '0;
      delta     <= D0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_rate  <= RATE_1_3;
      bank_rate <= '{RATE_1_3, RATE_1_3};
    end else begin
      if (wfire) begin
        if (wcnt == '0) bank_rate[wbank] <= in.rate;
        if (wcnt == AW'(N - 1)) begin
          wcnt        <= '0;
          wbank       <= !wbank;
        end else begin
          wcnt <= wcnt + AW'(1);
        end
      end
      if (out_valid && out_ready && !rfire) out_valid <= 1'b0;
      if (rfire) begin
        out_valid <= 1'b1;
        out_first <= (rcnt == '0);
        out_last  <= (rcnt == AW'(N - 1));
        out_rate  <= bank_rate[rbank];
        if (rcnt == AW'(N - 1)) begin
          rcnt  <= '0;
          perm  <= '0;
          delta <= D0;
          rbank <= !rbank;
        end else begin
          rcnt  <= rcnt + AW'(1);
          perm  <= add_mod(perm, delta);
          delta <= add_mod(delta, DINC);
        end
      end
      // bank status: set when the last bit is written, cleared when read out
      for (int b = 0; b < 2; b++) begin
        if (wfire && wcnt == AW'(N - 1) && wbank == 1'(b)) full[b] <= 1'b1;
        else if (rfire && rcnt == AW'(N - 1) && rbank == 1'(b)) full[b] <= 1'b0;
      end
    end
  end

  assign out = '{b: rd_bit, first: out_first, last: out_last, rate: out_rate};

  // A full bank is never written.
  assert property (@(posedge clk) disable iff (!rst_n) wfire |-> !full[wbank]);

endmodule
