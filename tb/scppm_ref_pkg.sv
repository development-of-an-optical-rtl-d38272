// scppm_ref_pkg: a reference model of the whole transmit waveform for the
// end-to-end testbenches. It computes, codeword by codeword and with plain
// arrays, the slot sequence the waveform must send for a given configuration,
// starting from reset: test data, 32-bit marker per frame, slicing, the CCSDS
// randomizer sequence, CRC-32 by polynomial long division, two zero bits, the
// (5,7,7) convolutional code with puncturing, the quadratic permutation, the
// accumulator, symbol mapping, the convolutional channel interleaver (by its
// delay rule), the 16-symbol marker, symbol repeats and the slot frames with
// guard time and slot repeats. Nothing here is shared with the design's code.
package scppm_ref_pkg;
  import scppm_pkg::*;

  typedef bit bitq_t [$];

  // Test data from reset, MSB first per byte.
  function automatic bitq_t source_bits(src_e src, logic [7:0] cbyte, int n);
    bitq_t q;
    logic [7:0] v;
    for (int i = 0; i < n; i++) begin
      if (src == SRC_PRBS23) q.push_back((i < 23) ? 1'b1 : q[i-23] ^ q[i-18]);
      else begin
        v = (src == SRC_CONST) ? cbyte : 8'(i / 8);
        q.push_back(v[7 - i % 8]);
      end
    end
    return q;
  endfunction

  // Slot sequence of the first ncw codewords, channel interleaver N x B.
  function automatic bitq_t ref_slots(src_e src, logic [7:0] cbyte, rate_e rt, int m, int r, int qr,
                                  int ncw, int frame_bits, int cin, int cib);
    bitq_t data, stream, out;
    int k, kin, s_per_cw, need, t, row, pos;
    int syms [$];
    int chs [$];
    k   = int'(info_bits(rt));
    kin = int'(enc_in_bits(rt));
    // data with frame markers
    need = ncw * k;
    data = source_bits(src, cbyte, need + 2000);
    pos = 0;
    while (stream.size() < need) begin
      for (int i = 0; i < 32; i++) stream.push_back(TFSM[31 - i]);
      for (int i = 0; i < frame_bits; i++) stream.push_back(data[pos++]);
    end
    for (int c = 0; c < ncw; c++) begin
      bit blk [$];
      bit pn [$];
      bit d [$];
      bit enc [$];
      bit cw [CODEWORD_BITS];
      logic [32:0] g;
      bit a;
      int v;
      // slice and randomize
      for (int i = 0; i < 8; i++) pn.push_back(1);
      for (int i = 8; i < k; i++) pn.push_back(pn[i-1] ^ pn[i-3] ^ pn[i-5] ^ pn[i-8]);
      for (int i = 0; i < k; i++) blk.push_back(stream[c * k + i] ^ pn[i]);
      // CRC by long division, first 32 bits inverted for the preset
      d = blk;
      for (int i = 0; i < 32; i++) d[i] = !d[i];
      for (int i = 0; i < 32; i++) d.push_back(0);
      g = {1'b1, CRC32_POLY};
      for (int i = 0; i + 32 < d.size(); i++)
        if (d[i]) for (int j = 0; j <= 32; j++) d[i+j] ^= g[32-j];
      for (int j = 0; j < 32; j++) blk.push_back(d[d.size() - 32 + j]);
      blk.push_back(0);
      blk.push_back(0);
      if (blk.size() != kin) $fatal(1, "reference block size");
      // encode and puncture
      for (int i = 0; i < kin; i++) begin
        bit u1, u2, c0, c1;
        u1 = (i >= 1) ? blk[i-1] : 0;
        u2 = (i >= 2) ? blk[i-2] : 0;
        c0 = blk[i] ^ u2;
        c1 = blk[i] ^ u1 ^ u2;
        enc.push_back(c0);
        if (rt == RATE_1_3) begin enc.push_back(c1); enc.push_back(c1); end
        else if (rt == RATE_1_2) enc.push_back(c1);
        else if (i % 2 == 0) enc.push_back(c1);
      end
      if (enc.size() != CODEWORD_BITS) $fatal(1, "reference codeword size");
      // interleave and accumulate
      a = 0;
      for (longint j = 0; j < CODEWORD_BITS; j++) begin
        a ^= enc[(11 * j + 210 * j * j) % CODEWORD_BITS];
        cw[j] = a;
      end
      // symbols
      for (int j = 0; j < CODEWORD_BITS; j += m) begin
        v = 0;
        for (int b = 0; b < m; b++) v = 2 * v + cw[j + b];
        syms.push_back(v);
      end
    end
    // channel interleaver, marker, repeats, slots
    s_per_cw = CODEWORD_BITS / m;
    for (t = 0; t < syms.size(); t++) begin
      row = t % cin;
      chs.push_back((t - row * cib * cin >= 0) ? syms[t - row * cib * cin] : 0);
    end
    for (t = 0; t < chs.size(); t++) begin
      int seq [$];
      if (t % s_per_cw == 0)
        for (int j = 0; j < 16; j++) seq.push_back(((CSM_BASE >> (2 * j)) & 3) * (1 << m) / 4);
      seq.push_back(chs[t]);
      foreach (seq[i]) for (int rep = 0; rep < r; rep++)
        for (int sl = 0; sl < ((1 << m) + (1 << m) / 4) * qr; sl++)
          out.push_back(sl / qr == seq[i]);
    end
    return out;
  endfunction

endpackage
