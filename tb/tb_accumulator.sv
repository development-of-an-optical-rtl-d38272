// tb_accumulator: random codewords of random length; each output bit must be
// the XOR of all input bits of its codeword so far (the running parity,
// restarting at every first flag). Flags and rate pass unchanged.
module tb_accumulator;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  accumulator dut (.*);
  always #5 clk = ~clk;

  bit_beat_t src [$], exp_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_beat_t e;
    int sent = 0, n;
    bit par;
    for (int c = 0; c < 10; c++) begin
      n = 50 + $urandom % 400;
      par = 0;
      for (int i = 0; i < n; i++) begin
        e = '{b: 1'($urandom), first: i == 0, last: i == n - 1, rate: rate_e'(c % 3)};
        src.push_back(e);
        par ^= e.b;
        e.b = par;
        exp_q.push_back(e);
      end
    end
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
