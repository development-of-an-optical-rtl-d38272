// crc_termination: appends a CRC-32 and two termination bits to every
// information block. The CRC lets the receiver check a decoded block; the two
// zero bits return the memory-2 convolutional encoder to the all-zero state at
// the end of each block.
//
// Data bits pass through unchanged while the CRC register is updated bit by bit
// (generator 04C11DB7 hex, preset all ones, no final inversion). After the
// block's last bit the input is held off for 34 beats: the 32 CRC bits, most
// significant first, then two zeros. The last flag moves to the second
// termination bit; the first flag and the rate tag are kept. Interface:
// valid/ready streams of bit_beat_t; one register stage. The CRC length and the
// two termination bits follow the document; the polynomial, preset and bit
// order are this design's choices.
module crc_termination
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

  typedef enum logic [1:0] {S_DATA, S_CRC, S_TERM} state_e;

  state_e      state;
  logic [31:0] crc;
  logic [31:0] crc_in;    // CRC register before this bit
  logic [5:0]  cnt;       // beats sent in S_CRC / S_TERM
  rate_e       blk_rate;
  logic        adv;
  logic        fire;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && state == S_DATA;
  assign fire     = adv && (state != S_DATA || in_valid);
  assign crc_in   = in.first ? CRC32_PRESET : crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DATA;
      crc       <= CRC32_PRESET;
      cnt       <= '0;
      blk_rate  <= RATE_1_3;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        case (state)
          S_DATA: begin
            out      <= in;
            out.last <= 1'b0;
            blk_rate <= in.rate;
            crc      <= {crc_in[30:0], 1'b0} ^ ((crc_in[31] ^ in.b) ? CRC32_POLY : 32'd0);
            if (in.last) begin
              state <= S_CRC;
              cnt   <= '0;
            end
          end
          S_CRC: begin
            out <= '{b: crc[31], first: 1'b0, last: 1'b0, rate: blk_rate};
            crc <= {crc[30:0], 1'b0};
            cnt <= cnt + 6'd1;
            if (cnt == 6'd31) begin
              state <= S_TERM;
              cnt   <= '0;
            end
          end
          default: begin
            out <= '{b: 1'b0, first: 1'b0, last: cnt == 6'd1, rate: blk_rate};
            cnt <= cnt + 6'd1;
            if (cnt == 6'd1) state <= S_DATA;
          end
        endcase
      end
    end
  end

endmodule
