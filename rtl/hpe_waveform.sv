// hpe_waveform: the CCSDS high-photon-efficiency (SCPPM) downlink transmit
// waveform that runs on the FPGA of the optical slice. It turns test data into
// PPM slots, 16 per clock, for the serializer on the optical mezzanine card.
//
// The chain, in order:
//   data generation -> transfer frame sync marker -> slicer -> randomizer ->
//   CRC-32 + 2 termination bits -> convolutional encoder (1/3, 1/2, 2/3) ->
//   code interleaver -> accumulator -> PPM symbol mapper -> channel
//   interleaver -> codeword sync marker -> symbol repeater -> modulation
//   mapping + guard time -> slot repeater + wrapper
// Up to the accumulator the data is a stream of single bits; from the mapper
// on, a stream of PPM symbols. Every link is a valid/ready stream, so a block
// that needs time (the marker inserters, the encoder's extra code bits, the
// repeaters) holds the blocks before it. The waveform controller holds the
// settings written by the host; code rate and PPM order are sampled once per
// codeword and carried along with the data, so they can be changed at any time.
//
// One clock, the serializer's clock divided by 16 (125 MHz at a 2 GHz slot
// clock). Interface: the controller's register port, the 16-lane slot word
// with its valid, and a pulse when the wrapper ran short of slots. The block
// order and the reconfigurable parameters follow the document; the bit-serial
// streams with backpressure replace its 8-bit buses with data enables and are
// this design's choice (see the README for what that means for the data rate).
module hpe_waveform
  import scppm_pkg::*;
#(
  parameter int unsigned FRAME_BITS = 8920,
  parameter int unsigned CI_N       = 6,
  parameter int unsigned CI_B       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  output logic [15:0] slots,
  output logic        slots_valid,
  output logic        underflow
);

  cfg_t cfg;

  bit_beat_t gen_d, tf_d, sl_d, rz_d, crc_d, enc_d, ci_d, acc_d;
  logic      gen_v, tf_v, sl_v, rz_v, crc_v, enc_v, ci_v, acc_v;
  logic      gen_r, tf_r, sl_r, rz_r, crc_r, enc_r, ci_r, acc_r;
  sym_beat_t map_d, chi_d, csm_d, rep_d;
  logic      map_v, chi_v, csm_v, rep_v;
  logic      map_r, chi_r, csm_r, rep_r;
  ppm_desc_t mod_d;
  logic      mod_v, mod_r;

  waveform_controller u_ctrl (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .underflow, .cfg
  );

  data_generation u_gen (
    .clk, .rst_n, .enable(cfg.enable), .src(cfg.src), .const_byte(cfg.const_byte),
    .out(gen_d), .out_valid(gen_v), .out_ready(gen_r)
  );

  tfsm_attachment #(.FRAME_BITS(FRAME_BITS)) u_tfsm (
    .clk, .rst_n, .in(gen_d), .in_valid(gen_v), .in_ready(gen_r),
    .out(tf_d), .out_valid(tf_v), .out_ready(tf_r)
  );

  slicer u_slicer (
    .clk, .rst_n, .rate_cfg(cfg.rate), .in(tf_d), .in_valid(tf_v), .in_ready(tf_r),
    .out(sl_d), .out_valid(sl_v), .out_ready(sl_r)
  );

  randomizer u_rand (
    .clk, .rst_n, .in(sl_d), .in_valid(sl_v), .in_ready(sl_r),
    .out(rz_d), .out_valid(rz_v), .out_ready(rz_r)
  );

  crc_termination u_crc (
    .clk, .rst_n, .in(rz_d), .in_valid(rz_v), .in_ready(rz_r),
    .out(crc_d), .out_valid(crc_v), .out_ready(crc_r)
  );

  convolutional_encoder u_enc (
    .clk, .rst_n, .in(crc_d), .in_valid(crc_v), .in_ready(crc_r),
    .out(enc_d), .out_valid(enc_v), .out_ready(enc_r)
  );

  code_interleaver u_cil (
    .clk, .rst_n, .in(enc_d), .in_valid(enc_v), .in_ready(enc_r),
    .out(ci_d), .out_valid(ci_v), .out_ready(ci_r)
  );

  accumulator u_acc (
    .clk, .rst_n, .in(ci_d), .in_valid(ci_v), .in_ready(ci_r),
    .out(acc_d), .out_valid(acc_v), .out_ready(acc_r)
  );

  ppm_symbol_mapper u_map (
    .clk, .rst_n, .log2m_cfg(cfg.log2m), .in(acc_d), .in_valid(acc_v), .in_ready(acc_r),
    .out(map_d), .out_valid(map_v), .out_ready(map_r)
  );

  channel_interleaver #(.N(CI_N), .B(CI_B)) u_chil (
    .clk, .rst_n, .in(map_d), .in_valid(map_v), .in_ready(map_r),
    .out(chi_d), .out_valid(chi_v), .out_ready(chi_r)
  );

  csm_insertion u_csm (
    .clk, .rst_n, .in(chi_d), .in_valid(chi_v), .in_ready(chi_r),
    .out(csm_d), .out_valid(csm_v), .out_ready(csm_r)
  );

  symbol_repeater u_srep (
    .clk, .rst_n, .reps_cfg(cfg.sym_reps), .in(csm_d), .in_valid(csm_v), .in_ready(csm_r),
    .out(rep_d), .out_valid(rep_v), .out_ready(rep_r)
  );

  modulation_mapper u_mod (
    .clk, .rst_n, .in(rep_d), .in_valid(rep_v), .in_ready(rep_r),
    .out(mod_d), .out_valid(mod_v), .out_ready(mod_r)
  );

  slot_repeater_wrapper u_wrap (
    .clk, .rst_n, .reps_cfg(cfg.slot_reps), .in(mod_d), .in_valid(mod_v), .in_ready(mod_r),
    .slots, .slots_valid, .underflow
  );

endmodule
