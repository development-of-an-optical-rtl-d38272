// serializer: behavioural model of the 16:1 multiplexer on the optical
// mezzanine card, the part that turns the waveform's 16 parallel lines into the
// serial PPM slot stream that drives the optical modulator. It stands for an
// off-the-shelf high-speed multiplexer chip, not for FPGA logic.
//
// The part runs on the slot clock (2 GHz for 0.5 ns slots) and returns that
// clock divided by 16 (clk_div16, 125 MHz), which clocks the waveform so that
// the two stay in step. clk_div16 rises when the 4-bit slot counter goes from 7
// to 8; the model takes the parallel word at the slot clock edge where the
// counter is 15, half a word period after the waveform has launched it, and
// shifts it out lane 0 first over the next 16 slot clocks, one lane per slot
// clock, on ppm_data. A word thus leaves on ppm_data 9 to 24 slot clocks after
// the clk_div16 edge that launched it. The 16 lines, the serial output at the
// slot clock and the clock divided by 16 follow the document; the sampling
// point and lane order are this model's choices.
module serializer (
  input  logic        slot_clk,
  input  logic        rst_n,
  input  logic [15:0] par_data,
  output logic        ppm_data,
  output logic        clk_div16
);

  logic [3:0]  cnt;
  logic [15:0] shreg;

  assign clk_div16 = cnt[3];

  always_ff @(posedge slot_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      shreg    <= '0;
      ppm_data <= 1'b0;
    end else begin
      cnt      <= cnt + 4'd1;
      ppm_data <= shreg[0];
      if (cnt == 4'd15) shreg <= par_data;
      else              shreg <= {1'b0, shreg[15:1]};
    end
  end

endmodule
