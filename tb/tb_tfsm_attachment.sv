// tb_tfsm_attachment: random bits in, random backpressure out; the output must
// be, frame after frame, the 32-bit marker 1ACFFC1D (MSB first) followed by
// FRAME_BITS input bits in order. A short frame keeps the run small.
module tb_tfsm_attachment;
  import scppm_pkg::*;
  localparam int FB = 40;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  tfsm_attachment #(.FRAME_BITS(FB)) dut (.*);
  always #5 clk = ~clk;

  bit src [$];
  bit exp_q [$];
  int sent = 0, got = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 6; f++) begin
      for (int i = 0; i < 32; i++) exp_q.push_back(TFSM[31 - i]);
      for (int i = 0; i < FB; i++) begin
        bit b = 1'($urandom);
        src.push_back(b);
        exp_q.push_back(b);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (got < exp_q.size()) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = (sent < src.size()) && ($urandom % 3 != 0);
        if (in_valid) in.b = src[sent];
      end
      out_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        checks++;
        if (out.b != exp_q[got]) begin
          failures++;
          if (failures < 10) $display("FAIL beat %0d got %0b exp %0b", got, out.b, exp_q[got]);
        end
        got++;
      end
      #1;
      if (in_valid && in_ready) in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
