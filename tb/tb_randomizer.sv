// tb_randomizer: sends blocks of zeros and of random bits. With zeros in, the
// output is the sequence itself, which must start FF 48 0E C0 9A (the CCSDS
// pseudo-randomizer sequence) and restart at every block's first bit; for
// random data the output must be the input XOR that sequence. Flags and rate
// must pass unchanged.
module tb_randomizer;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  randomizer dut (.*);
  always #5 clk = ~clk;

  localparam logic [39:0] SEQ = 40'hFF480EC09A;
  localparam int BL = 300;  // block length used here
  bit pn [BL];
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
    int sent = 0;
    // reference sequence by its recurrence a[k+8] = a[k+7]^a[k+5]^a[k+3]^a[k]
    for (int i = 0; i < 8; i++) pn[i] = 1;
    for (int i = 8; i < BL; i++) pn[i] = pn[i-1] ^ pn[i-3] ^ pn[i-5] ^ pn[i-8];
    for (int i = 0; i < 40; i++) begin
      checks++;
      if (pn[i] != SEQ[39 - i]) begin failures++; $display("FAIL reference sequence bit %0d", i); end
    end
    for (int blk = 0; blk < 8; blk++)
      for (int i = 0; i < BL; i++) begin
        e = '{b: (blk < 2) ? 1'b0 : 1'($urandom), first: i == 0, last: i == BL - 1,
              rate: rate_e'(blk % 3)};
        src.push_back(e);
        e.b = e.b ^ pn[i];
        exp_q.push_back(e);
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
