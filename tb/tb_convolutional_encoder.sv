// tb_convolutional_encoder: feeds blocks at every code rate, among them one
// full-size block per rate (5040, 7560, 10080 bits), and compares the code bits
// with a model: c0 = u(k)^u(k-2), c1 = c2 = u(k)^u(k-1)^u(k-2) from a cleared
// state, punctured per pair of input bits as 111|111, 110|101, 110|100. A
// full-size block must give exactly 15120 code bits. The output rate is checked
// too: with the sink always ready, a rate 1/3 block must produce one code bit
// per clock.
module tb_convolutional_encoder;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;
  logic always_ready = 0;

  convolutional_encoder dut (.*);
  always #5 clk = ~clk;

  bit_beat_t src [$], exp_q [$];
  int full_counts [3];
  int blk_out;

  task automatic add_block(int n, rate_e rt);
    bit u [$];
    bit c [3];
    bit keep [2][3];
    bit_beat_t e;
    int nout = 0, total = 0;
    case (rt)
      RATE_1_2: keep = '{'{1, 1, 0}, '{1, 0, 1}};
      RATE_2_3: keep = '{'{1, 1, 0}, '{1, 0, 0}};
      default:  keep = '{'{1, 1, 1}, '{1, 1, 1}};
    endcase
    for (int k = 0; k < n; k++) u.push_back((k >= n - 2) ? 0 : 1'($urandom));
    for (int k = 0; k < n; k++) begin
      bit u1 = (k >= 1) ? u[k-1] : 0;
      bit u2 = (k >= 2) ? u[k-2] : 0;
      src.push_back('{b: u[k], first: k == 0, last: k == n - 1, rate: rt});
      c[0] = u[k] ^ u2;
      c[1] = u[k] ^ u1 ^ u2;
      c[2] = c[1];
      for (int j = 0; j < 3; j++) if (keep[k % 2][j]) total++;
    end
    for (int k = 0; k < n; k++) begin
      bit u1 = (k >= 1) ? u[k-1] : 0;
      bit u2 = (k >= 2) ? u[k-2] : 0;
      c[0] = u[k] ^ u2;
      c[1] = u[k] ^ u1 ^ u2;
      c[2] = c[1];
      for (int j = 0; j < 3; j++) if (keep[k % 2][j]) begin
        exp_q.push_back('{b: c[j], first: nout == 0, last: nout == total - 1, rate: rt});
        nout++;
      end
    end
    if (n == int'(enc_in_bits(rt))) full_counts[rt] = nout;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit_beat_t e;
    int sent = 0;
    int t0, t1;
    for (int r = 0; r < 3; r++) begin
      add_block(2 * (20 + $urandom % 100), rate_e'(r));
      add_block(int'(enc_in_bits(rate_e'(r))), rate_e'(r));
    end
    for (int r = 0; r < 3; r++) begin
      checks++;
      if (full_counts[r] != 15120) begin failures++; $display("FAIL model count %0d", full_counts[r]); end
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
    // rate check: rate 1/3, input always valid, sink always ready
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    src.delete();
    exp_q.delete();
    add_block(600, RATE_1_3);
    sent = 0;
    blk_out = 0;
    out_ready = 1;
    in_valid = 1;
    in = src[0];
    t0 = -1;
    t1 = -1;
    for (int cyc = 0; blk_out < 1800 && cyc < 5000; cyc++) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = exp_q.pop_front();
        checks++;
        if (out != e) failures++;
        if (blk_out == 0) t0 = cyc;
        blk_out++;
        if (blk_out == 1800) t1 = cyc;
      end
      if (in_valid && in_ready) begin
        sent++;
        #1;
        if (sent < src.size()) in = src[sent]; else in_valid = 0;
      end
    end
    checks++;
    if (t1 - t0 != 1799) begin
      failures++;
      $display("FAIL 1800 code bits took %0d clocks", t1 - t0 + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
