// tb_ppm_symbol_mapper: codewords at every PPM order from M = 4 to 256, the
// configured order changed in the middle of codewords; each codeword must be
// cut into symbols of log2(M) bits, first bit most significant, all with the
// order in force at the codeword's first bit, and the first symbol flagged.
// Codewords are 840 bits here (a multiple of 2..8) to keep the run short.
module tb_ppm_symbol_mapper;
  import scppm_pkg::*;
  localparam int CW = 840;

  logic clk = 0, rst_n = 0;
  logic [3:0] log2m_cfg = 4;
  bit_beat_t in = '0;
  sym_beat_t out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  ppm_symbol_mapper dut (.*);
  always #5 clk = ~clk;

  bit_beat_t src [$];
  sym_beat_t exp_q [$];
  int cw_m [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_beat_t e;
    int sent = 0, m, v;
    for (int c = 0; c < 14; c++) begin
      m = 2 + c % 7;
      cw_m.push_back(m);
      for (int i = 0; i < CW; i += m) begin
        v = $urandom % (1 << m);
        for (int j = m - 1; j >= 0; j--)
          src.push_back('{b: v[j], first: i == 0 && j == m - 1, last: i + m == CW && j == 0,
                          rate: RATE_1_3});
        exp_q.push_back('{sym: 8'(v), log2m: 4'(m), first: i == 0, csm: 0});
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      if (!in_valid) begin
        in_valid = (sent < src.size()) && ($urandom % 4 != 0);
        if (in_valid) begin
          in = src[sent];
          // the order comes from the configuration at each codeword's first bit
          if (in.first) log2m_cfg = 4'(cw_m.pop_front());
          else if ($urandom % 50 == 0) log2m_cfg = 4'(2 + $urandom % 7);
        end
      end
      out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = exp_q.pop_front();
        checks++;
        if (out != e) begin
          failures++;
          if (failures < 10) $display("FAIL got %p exp %p", out, e);
        end
      end
      if (in_valid && in_ready) begin
        sent++;
        #1 in_valid = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
