// slot_repeater_wrapper: slot repeater and wrapper interface, the last block of
// the waveform. It stretches every slot to Q slot clocks (Q = 1, 2, 4, 8, 16 or
// 1024), which turns the 0.5 ns slot of a 2 GHz slot clock into 1, 2, 4, 8 or
// 512 ns slots, and packs the slots into 16-bit words, one per waveform clock,
// for the 16:1 serializer on the optical mezzanine card.
//
// Slot repeater: each incoming frame description (pulse slot p, length L) is
// scaled to Q slot clocks: the pulse covers slot clocks [p*Q, (p+1)*Q) of a
// frame of L*Q. Q is sampled when the frame is taken. Scaled frames wait in a
// FIFO of FIFO_DEPTH entries.
// Wrapper: every clock the wrapper fills lanes 0..15 of the output word (lane 0
// is sent first) by walking through the FIFO from its head: a lane is 1 when
// its slot clock lies in the current frame's pulse, and a frame that ends
// within the word hands over to the next frame at the next lane. A word spans
// at most four frames (the shortest frame, M = 4 and Q = 1, is 5 slots), so
// the head four entries are looked at and up to four are popped per clock.
// The word stream starts once four frames are waiting. From then on a lane
// with no frame left is sent empty and the underflow output pulses for that
// clock: the slot sequence then has a gap, which means the waveform upstream
// did not keep up. The serializer takes a word every clock, so there is no
// backpressure on the output. Word output is registered.
// The slot repeats, the 16 parallel lines and one word per clock follow the
// document; lane order, start condition and underflow handling are this
// design's choices.
module slot_repeater_wrapper
  import scppm_pkg::*;
#(
  parameter int unsigned LANES      = 16,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [10:0]      reps_cfg,
  input  ppm_desc_t        in,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [LANES-1:0] slots,      // lane 0 is the earliest slot
  output logic             slots_valid,
  output logic             underflow
);

  localparam int unsigned LOOK = 4;
  localparam int unsigned PW   = $clog2(FIFO_DEPTH);

  typedef struct packed {
    logic [18:0] ps;   // first slot clock of the pulse
    logic [18:0] pe;   // first slot clock after the pulse
    logic [18:0] len;  // slot clocks in the frame
  } frame_t;

  frame_t        fifo [FIFO_DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;
  logic [18:0]   pos;       // slot clock within the head frame
  logic          running;
  logic          push;
  logic [2:0]    npop;
  logic [18:0]   pos_nxt;
  logic [LANES-1:0] word;
  logic          miss;
  logic [10:0]   q;
  frame_t        scaled;

  assign q        = (reps_cfg == 11'd0) ? 11'd1 : reps_cfg;
  assign in_ready = (count < (PW+1)'(FIFO_DEPTH));
  assign push     = in_valid && in_ready;

  always_comb begin
    scaled.ps  = 19'(in.pulse) * 19'(q);
    scaled.pe  = 19'(in.pulse) * 19'(q) + 19'(q);
    scaled.len = 19'(in.len) * 19'(q);
  end

  // Walk the lanes of one word through the head frames.
  always_comb begin
    logic [2:0]  idx;
    logic [18:0] p;
    frame_t      f;
    idx  = '0;
    p    = pos;
    f    = '0;
    miss = 1'b0;
    word = '0;
    for (int l = 0; l < int'(LANES); l++) begin
      if ((PW+1)'(idx) < count && idx < 3'(LOOK)) begin
        f = fifo[rd_ptr + PW'(idx)];
        word[l] = (p >= f.ps) && (p < f.pe);
        if (p + 19'd1 == f.len) begin
          p   = '0;
          idx = idx + 3'd1;
        end else begin
          p = p + 19'd1;
        end
      end else begin
        miss = 1'b1;
      end
    end
    npop    = idx;
    pos_nxt = p;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr      <= '0;
      wr_ptr      <= '0;
      count       <= '0;
      pos         <= '0;
      running     <= 1'b0;
      slots       <= '0;
      slots_valid <= 1'b0;
      underflow   <= 1'b0;
    end else begin
      if (!running && count >= (PW+1)'(LOOK)) running <= 1'b1;
      if (push) begin
        fifo[wr_ptr] <= scaled;
        wr_ptr       <= wr_ptr + PW'(1);
      end
      slots_valid <= running;
      underflow   <= running && miss;
      if (running) begin
        slots  <= word;
        pos    <= pos_nxt;
        rd_ptr <= rd_ptr + PW'(npop);
      end else begin
        slots <= '0;
      end
      count <= count + (PW+1)'(push) - (running ? (PW+1)'(npop) : '0);
    end
  end

endmodule
