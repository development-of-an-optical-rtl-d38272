// symbol_repeater: sends every PPM symbol R times in a row, R = 1, 2, 3, 4, 8,
// 16 or 32, which lowers the effective symbol rate of the link.
//
// R is sampled from the configuration when a symbol is taken, so a new value
// applies from the next symbol on. The first copy keeps the symbol's first
// flag; the copies after it carry first = 0. With R = 1 the block passes one
// symbol per clock; with R > 1 it takes a new symbol while sending the last copy
// of the previous one, so the output never idles while input is waiting.
// Interface: valid/ready sym_beat_t streams, one register stage. The repeat
// factors follow the document.
module symbol_repeater
  import scppm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] reps_cfg,
  input  sym_beat_t  in,
  input  logic       in_valid,
  output logic       in_ready,
  output sym_beat_t  out,
  output logic       out_valid,
  input  logic       out_ready
);

  sym_beat_t  hold;   // symbol being repeated
  logic [5:0] left;   // copies of hold still to send
  logic [5:0] reps;
  logic       adv;
  logic       take;

  assign reps     = (reps_cfg == 6'd0) ? 6'd1 : reps_cfg;
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && left <= 6'd1;
  assign take     = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold      <= '0;
      left      <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (adv) out_valid <= 1'b0;
      if (adv && left != 6'd0) begin
        // send a stored copy
        out_valid  <= 1'b1;
        out        <= hold;
        hold.first <= 1'b0;
        if (take) begin
          hold <= in;
          left <= reps;
        end else begin
          left <= left - 6'd1;
        end
      end else if (take) begin
        // nothing stored: send the new symbol at once
        out_valid <= 1'b1;
        out        <= in;
        hold       <= in;
        hold.first <= 1'b0;
        left       <= reps - 6'd1;
      end
    end
  end

  // Handshake rule: a beat that is not taken stays, unchanged, until it is.
  // live is low from reset to the first clock edge after it, so a reset that
  // falls between two clock edges does not count as a broken rule.
  logic live;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) live <= 1'b0;
    else        live <= 1'b1;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   out_valid && !out_ready |=> !live || (out_valid && $stable(out)));

endmodule
