// tb_hpe_waveform: end-to-end check of the waveform chain without the
// serializer. For several configurations (data source, code rate, PPM order,
// symbol and slot repeats), each run from reset through the register port,
// every slot of the first codewords on the 16-lane output must equal the slot
// sequence of the reference model, the words must come one per clock with no
// underflow, and the configuration must read back.
module tb_hpe_waveform;
  import scppm_pkg::*;
  import scppm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic [15:0] slots;
  logic slots_valid, underflow;
  int checks = 0, failures = 0;

  hpe_waveform dut (.*);
  always #4 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 3'(a); reg_wdata = 16'(d);
    @(negedge clk); reg_we = 0;
  endtask

  task automatic run(src_e src, int cbyte, rate_e rt, int m, int r, int q, int ncw);
    bitq_t exp_q;
    int words = 0, unders = 0, gaps = 0, bad = 0;
    exp_q = ref_slots(src, 8'(cbyte), rt, m, r, q, ncw, 8920, 6, 4);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    wr(1, src); wr(2, cbyte); wr(3, rt); wr(4, m); wr(5, r); wr(6, q);
    @(negedge clk); reg_addr = 3'd4;
    #1 checks++;
    if (reg_rdata != 16'(m)) begin failures++; $display("FAIL read back M"); end
    wr(0, 1);
    while (exp_q.size() > 0) begin
      @(posedge clk);
      #1;
      if (slots_valid) begin
        words++;
        if (underflow) unders++;
        for (int l = 0; l < 16 && exp_q.size() > 0; l++) begin
          checks++;
          if (slots[l] != exp_q.pop_front()) begin
            failures++;
            bad++;
            if (bad < 5) $display("FAIL M=%0d word %0d lane %0d", 1 << m, words, l);
          end
        end
      end else if (words > 0) gaps++;
    end
    checks++;
    if (unders != 0 || gaps != 0) begin
      failures++;
      $display("FAIL M=%0d: %0d underflows, %0d idle clocks", 1 << m, unders, gaps);
    end
    $display("config src %0d rate %0d M=%0d R=%0d Q=%0d: %0d words checked, %0d bad slots",
             src, rt, 1 << m, r, q, words, bad);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(SRC_PRBS23, 0, RATE_1_2, 4, 1, 4, 2);
    run(SRC_COUNT, 0, RATE_2_3, 2, 4, 4, 2);
    run(SRC_CONST, 'hA5, RATE_1_3, 8, 1, 1, 1);
    run(SRC_PRBS23, 0, RATE_1_3, 6, 2, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
