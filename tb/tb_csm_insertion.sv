// tb_csm_insertion: codewords of random length and PPM order; ahead of each
// codeword's first symbol the output must carry the 16 marker symbols (entry k
// of the base pattern times M/4, computed here from the pattern's bits), the
// first of them flagged first, all flagged csm, and then the codeword's symbols
// unchanged with first and csm cleared. Also checks the number of symbols per
// codeword: 16 more than went in.
module tb_csm_insertion;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  sym_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  csm_insertion dut (.*);
  always #5 clk = ~clk;

  sym_beat_t src [$], exp_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_beat_t e;
    int sent = 0, n, m, markers = 0, nout = 0;
    for (int c = 0; c < 12; c++) begin
      n = 20 + $urandom % 200;
      m = 2 + c % 7;
      for (int k = 0; k < 16; k++) begin
        int base;
        base = int'((CSM_BASE >> (2 * k)) & 32'd3);
        exp_q.push_back('{sym: 8'(base * ((1 << m) / 4)), log2m: 4'(m), first: k == 0, csm: 1});
      end
      for (int i = 0; i < n; i++) begin
        e = '{sym: 8'($urandom % (1 << m)), log2m: 4'(m), first: i == 0, csm: 0};
        src.push_back(e);
        e.first = 0;
        exp_q.push_back(e);
      end
    end
    n = exp_q.size();
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      if (!in_valid) begin
        in_valid = (sent < src.size()) && ($urandom % 4 != 0);
        if (in_valid) in = src[sent];
      end
      out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = exp_q.pop_front();
        checks++;
        nout++;
        if (out.first && out.csm) markers++;
        if (out != e) begin
          failures++;
          if (failures < 10) $display("FAIL beat %0d got %0d/%0d/%0b/%0b exp %0d/%0d/%0b/%0b", nout,
                                      out.sym, out.log2m, out.first, out.csm, e.sym, e.log2m, e.first, e.csm);
        end
      end
      if (in_valid && in_ready) begin
        sent++;
        #1 in_valid = 0;
      end
    end
    checks++;
    if (markers != 12 || nout != src.size() + 12 * 16) begin
      failures++;
      $display("FAIL %0d markers, %0d symbols out", markers, nout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
