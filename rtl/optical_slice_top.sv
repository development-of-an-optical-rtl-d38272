// optical_slice_top: the optical transmit slice. The SCPPM waveform on the
// FPGA card sends 16 parallel slot lines through the mezzanine connector to
// the serializer on the optical mezzanine card, which puts the slots out one
// per slot clock as the PPM drive signal and returns the slot clock divided by
// 16, on which the whole waveform runs.
//
// slot_clk is the user's clock after the mezzanine's limiting amplifier (an
// analog part, not modelled). reg_* is the command and control port of the
// waveform controller, driven by the host. ppm_data is the serial slot stream;
// a 1 is a pulse. slots/slots_valid show the parallel word on the connector and
// underflow flags a word the waveform could not fill. The partition follows the
// document; the host port is this design's own register interface.
module optical_slice_top
  import scppm_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 8920,
  parameter int unsigned CI_N       = 6,
  parameter int unsigned CI_B       = 4
) (
  input  logic        slot_clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  output logic        ppm_data,
  output logic        clk_div16,
  output logic [15:0] slots,
  output logic        slots_valid,
  output logic        underflow
);

  hpe_waveform #(
    .FRAME_BITS(FRAME_BITS), .CI_N(CI_N), .CI_B(CI_B)
  ) u_waveform (
    .clk(clk_div16), .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .slots, .slots_valid, .underflow
  );

  serializer u_ser (
    .slot_clk, .rst_n, .par_data(slots), .ppm_data, .clk_div16
  );

endmodule
