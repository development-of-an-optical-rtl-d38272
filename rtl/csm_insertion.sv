// csm_insertion: puts a codeword synchronization marker (CSM) in front of
// every codeword, so the receiver can find codeword boundaries in the symbol
// stream.
//
// When the symbol that opens a codeword arrives (first set), the block first
// sends the CSM_LEN marker symbols, holding the input off, and then that
// symbol. Marker symbol k is CSM_BASE entry k scaled by M/4, for the PPM order
// carried by the opening symbol. Marker symbols carry csm = 1, the first of
// them first = 1; the data symbols carry csm = 0 and first = 0. Interface:
// valid/ready sym_beat_t streams; one register stage, one symbol per clock.
// Marker insertion follows the document; the marker length and pattern are
// this design's own choice.
module csm_insertion
  import scppm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sym_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output sym_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  logic       in_marker;  // marker of the waiting codeword is being sent
  logic       sent;       // marker of the waiting codeword has been sent
  logic [4:0] k;          // marker symbols sent
  logic       adv;
  logic       start;      // first marker symbol goes out now
  logic       fire_m;     // a marker symbol goes out
  logic       fire_d;     // a data symbol goes out

  assign adv      = !out_valid || out_ready;
  assign start    = adv && in_valid && in.first && !sent && !in_marker;
  assign fire_m   = adv && (start || in_marker);
  assign in_ready = adv && !in_marker && !(in.first && !sent);
  assign fire_d   = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_marker <= 1'b0;
      sent      <= 1'b0;
      k         <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !(fire_m || fire_d)) out_valid <= 1'b0;
      if (fire_m) begin
        out_valid <= 1'b1;
        out       <= '{sym: csm_symbol(32'(start ? 5'd0 : k), in.log2m), log2m: in.log2m,
                       first: start, csm: 1'b1};
        if (start) begin
          in_marker <= (CSM_LEN > 1);
          sent      <= (CSM_LEN == 1);
          k         <= 5'd1;
        end else if (32'(k) == CSM_LEN - 1) begin
          in_marker <= 1'b0;
          sent      <= 1'b1;
          k         <= '0;
        end else begin
          k <= k + 5'd1;
        end
      end else if (fire_d) begin
        out_valid <= 1'b1;
        out       <= in;
        out.first <= 1'b0;
        sent      <= 1'b0;
      end
    end
  end

endmodule
