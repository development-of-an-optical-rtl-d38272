// tb_code_interleaver: full-size codewords of 15120 random bits. Output bit j of
// each codeword must be input bit (11*j + 210*j*j) mod 15120, computed here
// directly with 64-bit arithmetic, with first/last on the codeword edges and
// the codeword's rate tag. The first three codewords go through with random
// valid and ready; then three more with valid and ready held high, where the
// ping-pong banks must take and give one bit per clock without a stall.
module tb_code_interleaver;
  import scppm_pkg::*;
  localparam int N = CODEWORD_BITS;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  code_interleaver dut (.*);
  always #5 clk = ~clk;

  bit_beat_t src [$], exp_q [$];

  task automatic add_cw(rate_e rt);
    bit u [N];
    longint j;
    for (int i = 0; i < N; i++) begin
      u[i] = 1'($urandom);
      src.push_back('{b: u[i], first: i == 0, last: i == N - 1, rate: rt});
    end
    for (int i = 0; i < N; i++) begin
      j = (11 * longint'(i) + 210 * longint'(i) * longint'(i)) % N;
      exp_q.push_back('{b: u[j], first: i == 0, last: i == N - 1, rate: rt});
    end
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
    int sent = 0, rx = 0;
    int in_stalls = 0, out_gaps = 0;
    for (int c = 0; c < 3; c++) add_cw(rate_e'(c));
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
    // full rate
    src.delete();
    for (int c = 0; c < 3; c++) add_cw(RATE_1_2);
    sent = 0;
    @(negedge clk);
    out_ready = 1;
    in_valid = 1;
    in = src[0];
    while (exp_q.size() > 0) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        e = exp_q.pop_front();
        rx++;
        checks++;
        if (out != e) failures++;
      end else if (rx > 0 && rx < 3 * N) out_gaps++;
      if (in_valid && !in_ready) in_stalls++;
      if (in_valid && in_ready) begin
        sent++;
        #1;
        if (sent < src.size()) in = src[sent]; else in_valid = 0;
      end
    end
    checks++;
    if (in_stalls != 0 || out_gaps != 0) begin
      failures++;
      $display("FAIL full rate: %0d input stalls, %0d output gaps", in_stalls, out_gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
