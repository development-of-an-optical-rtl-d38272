// tb_channel_interleaver: random symbols through the interleaver at its default
// size (N = 6 rows, B = 4). The symbol leaving at position t must be the one
// that entered at t - r*B*N, r = t mod N, or 0 while the delay line of row r
// still holds its reset contents; flags (first, log2m, csm) must stay with
// position t. The memory clear after reset must also hold the input off.
module tb_channel_interleaver;
  import scppm_pkg::*;
  localparam int N = 6, B = 4;

  logic clk = 0, rst_n = 0;
  sym_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  channel_interleaver dut (.*);
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
    int sent = 0, r, busy = 0;
    for (int t = 0; t < 3000; t++)
      src.push_back('{sym: 8'($urandom), log2m: 4'(2 + $urandom % 7), first: 1'($urandom % 7 == 0),
                      csm: 0});
    for (int t = 0; t < 3000; t++) begin
      r = t % N;
      e = src[t];
      e.sym = (t - r * B * N >= 0) ? src[t - r * B * N].sym : 8'd0;
      exp_q.push_back(e);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!in_ready) begin
      @(negedge clk);
      busy++;
    end
    checks++;
    if (busy + 1 < B * N * (N - 1) / 2) begin
      failures++;
      $display("FAIL input taken %0d clocks after reset, memory needs %0d", busy, B * N * (N - 1) / 2);
    end
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
        if (out != e) begin
          failures++;
          if (failures < 10) $display("FAIL at %0d got sym %0d first %0b exp sym %0d first %0b", 3000 - exp_q.size() - 1, out.sym, out.first, e.sym, e.first);
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
