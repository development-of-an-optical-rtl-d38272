// modulation_mapper: modulation mapping and guard time insertion. A PPM symbol
// of order M becomes a frame of M + M/4 slots: slot s (s = the symbol value) of
// the first M carries the pulse, the other slots are empty, and the last M/4
// slots are the guard time, always empty.
//
// The frame is described, not drawn: the output ppm_desc_t gives the pulse slot
// and the frame length, and the slot repeater and wrapper that follow expand it
// into slots. Interface: valid/ready streams, sym_beat_t in, ppm_desc_t out; one
// register stage, one symbol per clock. Pulse-position mapping and guard time
// insertion follow the document; the M/4 guard length is that of the CCSDS
// high photon efficiency standard the waveform implements, as the document
// does not state it.
module modulation_mapper
  import scppm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sym_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output ppm_desc_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  logic fire;
  logic [8:0] m_slots;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_ready && in_valid;
  assign m_slots  = 9'd1 << in.log2m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out.pulse <= in.sym & 8'(m_slots - 9'd1);
        out.len   <= m_slots + (m_slots >> 2);
      end
    end
  end

endmodule
