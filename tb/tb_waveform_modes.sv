// tb_waveform_modes: sweeps the waveform chain over every setting in the
// reconfigurable-parameter list and checks the slot stream of each against
// the reference model.
//
// Part 1 runs all 21 pairs of PPM order (M = 4 ... 256) and code rate (1/3,
// 1/2, 2/3) from reset. It checks every slot of the first codeword. Each M is
// given the smallest slot-repeat factor that keeps the one-bit-per-clock chain
// ahead of the serializer, so there must be no underflow and no idle word.
// Part 2 runs every slot-repeat factor (1, 2, 4, 8, 16, 1024) at M = 256.
// Part 3 runs every symbol-repeat factor (1, 2, 3, 4, 8, 16, 32) at M = 128.
// Parts 2 and 3 check the first 3000 words of each run.
//
// The expected stream is built from the model's plain slot sequence, without
// repeats, by index arithmetic. Slot k of the output is slot
// ((k/Q) mod L) of frame ((k/Q) div L) div R of the plain sequence, where L =
// M + M/4 is the frame length. This derives the repeats independently of the
// model's own repeat code.
module tb_waveform_modes;
  import scppm_pkg::*;
  import scppm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic [15:0] slots;
  logic slots_valid, underflow;
  int checks = 0, failures = 0;
  int n_runs = 0;

  hpe_waveform dut (.*);
  always #4 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 3'(a); reg_wdata = 16'(d);
    @(negedge clk); reg_we = 0;
  endtask

  // max_words = 0 checks the whole first codeword
  task automatic run(src_e src, rate_e rt, int m, int r, int q, int max_words);
    bitq_t plain;
    longint total, k = 0;
    int len, words = 0, unders = 0, gaps = 0, bad = 0, wait_clk = 0;
    plain = ref_slots(src, 8'h3C, rt, m, 1, 1, 1, 8920, 6, 4);
    len   = (1 << m) + (1 << m) / 4;
    total = longint'(plain.size()) * r * q;
    if (max_words != 0 && total > 16 * max_words) total = 16 * max_words;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    wr(1, src); wr(2, 'h3C); wr(3, rt); wr(4, m); wr(5, r); wr(6, q); wr(0, 1);
    n_runs++;
    while (k < total && wait_clk < 200000) begin
      @(posedge clk);
      #1;
      if (slots_valid) begin
        words++;
        if (underflow) unders++;
        for (int l = 0; l < 16 && k < total; l++) begin
          longint s;
          int idx;
          s   = k / q;
          idx = int'((s / len / r) * len + s % len);
          checks++;
          if (slots[l] != plain[idx]) begin
            failures++;
            bad++;
            if (bad < 4) $display("FAIL M=%0d rate %0d R=%0d Q=%0d slot %0d", 1 << m, rt, r, q, k);
          end
          k++;
        end
      end else if (words > 0) gaps++;
      else wait_clk++;
    end
    checks++;
    if (k < total) begin
      failures++;
      $display("FAIL M=%0d rate %0d R=%0d Q=%0d: no output", 1 << m, rt, r, q);
    end
    checks++;
    if (unders != 0 || gaps != 0) begin
      failures++;
      $display("FAIL M=%0d rate %0d R=%0d Q=%0d: %0d underflows, %0d idle clocks",
               1 << m, rt, r, q, unders, gaps);
    end
  endtask

  // smallest slot repeat that keeps 1.25*M*Q >= 16*log2(M) with margin
  function automatic int q_for(int m);
    case (m)
      2: return 16;
      3: return 8;
      4: return 4;
      5: return 4;
      6: return 2;
      default: return 1;
    endcase
  endfunction

  localparam int SLOT_REPS[6] = '{1, 2, 4, 8, 16, 1024};
  localparam int SYM_REPS[7]  = '{1, 2, 3, 4, 8, 16, 32};

  initial begin
    repeat (2) @(posedge clk);
    for (int m = 2; m <= 8; m++)
      for (int rt = 0; rt < 3; rt++)
        run(src_e'(m % 3), rate_e'(rt), m, 1, q_for(m), 0);
    $display("part 1: %0d order/rate pairs done, failures so far %0d", n_runs, failures);
    foreach (SLOT_REPS[i]) run(SRC_PRBS23, RATE_1_2, 8, 1, SLOT_REPS[i], 3000);
    $display("part 2: slot repeats done, failures so far %0d", failures);
    foreach (SYM_REPS[i]) run(SRC_PRBS23, RATE_2_3, 7, SYM_REPS[i], 1, 3000);
    $display("part 3: symbol repeats done, %0d runs in all", n_runs);
    checks++;
    if (n_runs != 34) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
