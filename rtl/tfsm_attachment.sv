// tfsm_attachment: cuts the generated bit stream into transfer frames of
// FRAME_BITS bits and puts the 32-bit transfer frame synchronization marker
// (1ACFFC1D hex, sent most significant bit first) in front of each.
//
// It alternates between two phases: 32 marker beats, during which the input is
// held off (in_ready low), then FRAME_BITS beats copied from the input. A
// marker is only sent while the frame's first bit is waiting at the input, so
// no marker goes out before the data source runs. Output
// is registered; one bit per clock at most. Interface: valid/ready streams of
// bit_beat_t in and out (field b only). Marker attachment follows the document;
// the marker value is the CCSDS attached sync marker and the frame length
// (1115 bytes) is this design's own choice, as the document gives none.
module tfsm_attachment
  import scppm_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 8920
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

  localparam int unsigned CW = $clog2(FRAME_BITS + 1);

  logic          marker_phase;
  logic [CW-1:0] cnt;  // beats sent in the current phase
  logic          adv;
  logic          fire;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && !marker_phase;
  assign fire     = adv && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      marker_phase <= 1'b1;
      cnt          <= '0;
      out_valid    <= 1'b0;
      out          <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out       <= '{b: marker_phase ? TFSM[5'd31 - 5'(cnt)] : in.b,
                       first: 1'b0, last: 1'b0, rate: RATE_1_3};
        if (marker_phase && cnt == CW'(31)) begin
          marker_phase <= 1'b0;
          cnt          <= '0;
        end else if (!marker_phase && cnt == CW'(FRAME_BITS - 1)) begin
          marker_phase <= 1'b1;
          cnt          <= '0;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end

endmodule
