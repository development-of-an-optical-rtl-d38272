// tb_slicer: streams random bits through the slicer while the configured code
// rate changes now and then. A model counts accepted bits and expects blocks of
// 5006, 7526 or 10046 bits (15120*r - 34) with first/last on the block edges
// and every bit tagged with the rate in force when its block began.
module tb_slicer;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  rate_e rate_cfg = RATE_2_3;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  slicer dut (.*);
  always #5 clk = ~clk;

  bit_beat_t exp_q [$];
  int cnt = 0, blocks = 0;
  rate_e brate;
  int rate_seen [3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_beat_t e;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (blocks < 6 || exp_q.size() > 0) begin
      @(negedge clk);
      if (cnt > 100 && $urandom % 3000 == 0) rate_cfg = rate_e'($urandom % 3);
      if (!in_valid) begin
        in_valid = (blocks < 6) && ($urandom % 4 != 0);
        in.b = 1'($urandom);
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
        if (cnt == 0) brate = rate_cfg;
        e = '{b: in.b, first: cnt == 0, last: cnt == int'(info_bits(brate)) - 1, rate: brate};
        exp_q.push_back(e);
        if (e.last) begin
          cnt = 0;
          blocks++;
          rate_seen[brate]++;
          rate_cfg = rate_e'((int'(brate) + 1) % 3);
        end else cnt++;
        #1 in_valid = 0;
      end
    end
    checks++;
    if (rate_seen[0] == 0 || rate_seen[1] == 0 || rate_seen[2] == 0) begin
      failures++;
      $display("FAIL rates seen %0d %0d %0d", rate_seen[0], rate_seen[1], rate_seen[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
