// tb_slot_repeater_wrapper: frames of every PPM order with slot repeats 1, 2, 4,
// 8, 16 and 1024 are expanded here into the expected slot sequence (pulse on
// slot clocks [p*Q, (p+1)*Q) of L*Q). Phase 1 keeps the input full and uses
// frames of at least 16 slot clocks, so the wrapper must send 16 slots on every
// clock without underflow, and the lanes, lane 0 first, must match the
// sequence. Phase 2 sends the shortest frames (M = 4, Q = 1, 5 slots) at one
// per clock, fewer than the 3.2 per clock a word needs, and the underflow
// output must report it.
module tb_slot_repeater_wrapper;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [10:0] reps_cfg = 1;
  ppm_desc_t in = '0;
  logic in_valid = 0, in_ready;
  logic [15:0] slots;
  logic slots_valid, underflow;
  int checks = 0, failures = 0;

  slot_repeater_wrapper dut (.*);
  always #5 clk = ~clk;

  ppm_desc_t src [$];
  int q_of [$];
  bit exp_q [$];
  int legal_q [6] = '{1, 2, 4, 8, 16, 1024};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_frame(int m, int q);
    int len, p;
    len = (1 << m) + (1 << m) / 4;
    p = $urandom % (1 << m);
    src.push_back('{pulse: 8'(p), len: 9'(len)});
    q_of.push_back(q);
    for (int s = 0; s < len * q; s++) exp_q.push_back(s >= p * q && s < (p + 1) * q);
  endtask

  initial begin
    int sent = 0, m, q, words = 0, gaps = 0, unders = 0, big = 0;
    for (int i = 0; i < 300; i++) begin
      do begin
        m = 2 + $urandom % 7;
        q = legal_q[$urandom % 5];
      end while (((1 << m) + (1 << m) / 4) * q < 16 || ((1 << m) * q > 2048));
      add_frame(m, q);
    end
    add_frame(2, 1024);
    add_frame(3, 1024);
    for (int i = 0; i < 10; i++) add_frame(4, 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (exp_q.size() > 0) begin
      @(negedge clk);
      in_valid = sent < src.size();
      if (in_valid) begin
        in = src[sent];
        reps_cfg = 11'(q_of[sent]);
      end
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (slots_valid) begin
        words++;
        if (underflow && exp_q.size() > 16) unders++;
        for (int l = 0; l < 16 && exp_q.size() > 0; l++) begin
          checks++;
          if (slots[l] != exp_q.pop_front()) begin
            failures++;
            if (failures < 10) $display("FAIL word %0d lane %0d", words, l);
          end
        end
      end else if (words > 0) gaps++;
    end
    checks++;
    if (gaps != 0 || unders != 0) begin
      failures++;
      $display("FAIL phase 1: %0d idle clocks, %0d underflows", gaps, unders);
    end
    // phase 2: starve it
    @(negedge clk); in_valid = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    unders = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = 1;
      in = '{pulse: 8'($urandom % 4), len: 9'd5};
      reps_cfg = 11'd1;
      @(posedge clk);
      #1 if (underflow) unders++;
    end
    checks++;
    if (unders == 0) begin
      failures++;
      $display("FAIL underflow never reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
