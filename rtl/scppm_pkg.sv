// scppm_pkg: types and constants shared by the blocks of the SCPPM optical
// transmit waveform (the CCSDS high-photon-efficiency downlink).
//
// The waveform moves data as a bit-serial stream up to the accumulator and as a
// stream of PPM symbols after the symbol mapper. Every stream is a packed beat
// struct qualified by a valid/ready handshake: a beat moves on a clock edge where
// both valid and ready are high. The code rates, PPM orders, repeat factors, the
// 15120-bit codeword and the data source choices follow the document; the
// field widths, the CRC preset, the puncturing patterns, the interleaver
// polynomial and the codeword synchronization marker pattern are this design's
// own choices (see the README).
package scppm_pkg;

  // Code rate of the outer convolutional code (rate 1/3 mother code, punctured).
  typedef enum logic [1:0] {
    RATE_1_3 = 2'd0,
    RATE_1_2 = 2'd1,
    RATE_2_3 = 2'd2
  } rate_e;

  // Test data source of the data generator.
  typedef enum logic [1:0] {
    SRC_PRBS23 = 2'd0,  // PRBS 2^23-1, x^23 + x^18 + 1
    SRC_CONST  = 2'd1,  // a constant byte, repeated
    SRC_COUNT  = 2'd2   // an 8-bit up-counter, one value per byte
  } src_e;

  // Coded bits in one SCPPM codeword, for every code rate and PPM order.
  localparam int unsigned CODEWORD_BITS = 15120;
  // CRC length and trellis termination bits added to each information block.
  localparam int unsigned CRC_BITS  = 32;
  localparam int unsigned TERM_BITS = 2;
  // Transfer frame synchronization marker (the CCSDS attached sync marker).
  localparam logic [31:0] TFSM = 32'h1ACF_FC1D;
  // CRC-32 generator polynomial (x^32 omitted) and register preset.
  localparam logic [31:0] CRC32_POLY   = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_PRESET = 32'hFFFF_FFFF;
  // Codeword synchronization marker: CSM_LEN PPM symbols. Entry k (2 bits,
  // entry 0 in the low bits) is scaled by M/4 to give symbol k for order M.
  localparam int unsigned CSM_LEN  = 16;
  localparam logic [31:0] CSM_BASE = 32'b01_10_10_01_11_00_10_01_00_00_11_11_01_10_00_11;

  // Encoder input bits per codeword: CODEWORD_BITS times the code rate.
  function automatic int unsigned enc_in_bits(rate_e r);
    case (r)
      RATE_1_2: return 7560;
      RATE_2_3: return 10080;
      default:  return 5040;
    endcase
  endfunction

  // Information bits the slicer cuts per codeword (CRC and termination excluded).
  function automatic int unsigned info_bits(rate_e r);
    return enc_in_bits(r) - CRC_BITS - TERM_BITS;
  endfunction

  // Codeword synchronization marker symbol k for PPM order 2**log2m.
  function automatic logic [7:0] csm_symbol(int unsigned k, logic [3:0] log2m);
    logic [7:0] base;
    base = 8'(CSM_BASE[2*(k%CSM_LEN) +: 2]);
    return base << (log2m - 4'd2);
  endfunction

  // One beat of the bit-serial stream.
  typedef struct packed {
    logic  b;      // the data bit
    logic  first;  // first bit of a block (information block or codeword)
    logic  last;   // last bit of a block
    rate_e rate;   // code rate this block is coded with
  } bit_beat_t;

  // One beat of the PPM symbol stream.
  typedef struct packed {
    logic [7:0] sym;    // PPM symbol value, 0 .. M-1
    logic [3:0] log2m;  // PPM order of this symbol, M = 2**log2m
    logic       first;  // first symbol of a codeword (or of a marker)
    logic       csm;    // symbol belongs to a codeword synchronization marker
  } sym_beat_t;

  // One PPM symbol as a slot pattern: LEN slots, of which slot PULSE is lit.
  typedef struct packed {
    logic [7:0] pulse;  // slot index of the pulse
    logic [8:0] len;    // slots in the symbol, guard time included (M + M/4)
  } ppm_desc_t;

  // Waveform configuration held by the waveform controller.
  typedef struct packed {
    logic        enable;     // data generation runs
    src_e        src;        // data source
    logic [7:0]  const_byte; // byte sent by SRC_CONST
    rate_e       rate;       // code rate
    logic [3:0]  log2m;      // PPM order M = 2**log2m, 2 .. 8
    logic [5:0]  sym_reps;   // symbol repeats, 1 .. 32
    logic [10:0] slot_reps;  // slot repeats, 1 .. 1024
  } cfg_t;

endpackage
