// tb_symbol_repeater: random symbols with the repeat factor changed between
// symbols over all legal values (1, 2, 3, 4, 8, 16, 32); each symbol must leave
// R times, first kept on the first copy only. With R = 1 and the sink always
// ready the block must pass one symbol per clock, and with R = 4 it must send
// 4 copies per symbol without idle clocks.
module tb_symbol_repeater;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [5:0] reps_cfg = 1;
  sym_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  symbol_repeater dut (.*);
  always #5 clk = ~clk;

  sym_beat_t src [$], exp_q [$];
  int rep_of [$];
  int legal [7] = '{1, 2, 3, 4, 8, 16, 32};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(bit random_hs);
    sym_beat_t e;
    int sent = 0;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      if (!in_valid) begin
        in_valid = (sent < src.size()) && (!random_hs || $urandom % 4 != 0);
        if (in_valid) begin
          in = src[sent];
          reps_cfg = 6'(rep_of[sent]);
        end
      end
      out_ready = !random_hs || ($urandom % 4) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = exp_q.pop_front();
        checks++;
        if (out != e) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d/%0b exp %0d/%0b", out.sym, out.first, e.sym, e.first);
        end
      end
      if (in_valid && in_ready) begin
        sent++;
        #1;
        if (!random_hs && sent < src.size()) begin
          in = src[sent];
          reps_cfg = 6'(rep_of[sent]);
        end else in_valid = 0;
      end
    end
  endtask

  task automatic build(int n, int fixed_r);
    sym_beat_t e;
    int r;
    src.delete();
    rep_of.delete();
    for (int i = 0; i < n; i++) begin
      r = (fixed_r > 0) ? fixed_r : legal[$urandom % 7];
      e = '{sym: 8'($urandom), log2m: 8, first: 1'($urandom % 5 == 0), csm: 1'($urandom)};
      src.push_back(e);
      rep_of.push_back(r);
      for (int k = 0; k < r; k++) begin
        exp_q.push_back(e);
        e.first = 0;
      end
    end
  endtask

  task automatic timed(int n, int r);
    int t0, t1, cyc;
    build(n, r);
    cyc = 0; t0 = -1; t1 = -1;
    fork
      stream(0);
      begin
        while (exp_q.size() > 0) begin
          @(posedge clk);
          cyc++;
          if (out_valid && t0 < 0) t0 = cyc;
        end
        t1 = cyc;
      end
    join
    checks++;
    $display("R=%0d: %0d copies in %0d clocks", r, n * r, t1 - t0 + 1);
    if (t1 - t0 + 1 > n * r + 1) begin
      failures++;
      $display("FAIL R=%0d: %0d symbols took %0d clocks", r, n * r, t1 - t0 + 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    build(400, 0);
    stream(1);
    timed(200, 1);
    timed(100, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
