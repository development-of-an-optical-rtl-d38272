// tb_modulation_mapper: every PPM order from 4 to 256 with random symbols; the
// frame description must give the symbol as pulse slot and M + M/4 slots as
// frame length (5, 10, 20, 40, 80, 160, 320), in order, under random
// backpressure.
module tb_modulation_mapper;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  sym_beat_t in = '0;
  ppm_desc_t out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  modulation_mapper dut (.*);
  always #5 clk = ~clk;

  sym_beat_t src [$];
  ppm_desc_t exp_q [$];
  int frame_len [9] = '{0, 0, 5, 10, 20, 40, 80, 160, 320};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ppm_desc_t e;
    int sent = 0, m, v;
    for (int i = 0; i < 2000; i++) begin
      m = 2 + $urandom % 7;
      v = $urandom % (1 << m);
      src.push_back('{sym: 8'(v), log2m: 4'(m), first: 1'($urandom), csm: 1'($urandom)});
      exp_q.push_back('{pulse: 8'(v), len: 9'(frame_len[m])});
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
          if (failures < 10) $display("FAIL got %0d/%0d exp %0d/%0d", out.pulse, out.len, e.pulse, e.len);
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
