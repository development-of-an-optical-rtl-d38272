// tb_crc_termination: checks that each block leaves followed by its CRC-32 and
// two zero bits. The CRC of the ASCII string "123456789" must be 0376E6E7 hex
// (CRC-32 with generator 04C11DB7, preset all ones, no inversion); for random
// blocks the CRC is worked out by long division of the message, with its first
// 32 bits inverted (the effect of the preset), times x^32 by the generator.
// Flags: first kept on the first bit, last only on the second termination bit.
module tb_crc_termination;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  bit_beat_t in = '0, out;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  crc_termination dut (.*);
  always #5 clk = ~clk;

  bit_beat_t src [$], exp_q [$];

  function automatic logic [31:0] crc_div(bit msg [$]);
    bit d [$];
    logic [32:0] g = {1'b1, CRC32_POLY};
    logic [31:0] r;
    d = msg;
    for (int i = 0; i < 32; i++) d[i] = !d[i];
    for (int i = 0; i < 32; i++) d.push_back(0);
    for (int i = 0; i + 32 < d.size(); i++)
      if (d[i]) for (int j = 0; j <= 32; j++) d[i+j] ^= g[32-j];
    for (int j = 0; j < 32; j++) r[31-j] = d[d.size()-32+j];
    return r;
  endfunction

  task automatic add_block(bit msg [$], rate_e rt);
    logic [31:0] c;
    bit_beat_t e;
    c = crc_div(msg);
    foreach (msg[i]) begin
      e = '{b: msg[i], first: i == 0, last: i == msg.size() - 1, rate: rt};
      src.push_back(e);
      e.last = 0;
      exp_q.push_back(e);
    end
    for (int i = 0; i < 32; i++) exp_q.push_back('{b: c[31-i], first: 0, last: 0, rate: rt});
    exp_q.push_back('{b: 0, first: 0, last: 0, rate: rt});
    exp_q.push_back('{b: 0, first: 0, last: 1, rate: rt});
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit msg [$];
    bit_beat_t e;
    string s = "123456789";
    int sent = 0;
    int n;
    for (int i = 0; i < 9; i++) for (int j = 7; j >= 0; j--) msg.push_back(s[i][j]);
    checks++;
    if (crc_div(msg) != 32'h0376E6E7) begin
      failures++;
      $display("FAIL reference CRC %h", crc_div(msg));
    end
    add_block(msg, RATE_1_2);
    for (int b = 0; b < 6; b++) begin
      msg.delete();
      n = 40 + $urandom % 600;
      for (int i = 0; i < n; i++) msg.push_back(1'($urandom));
      add_block(msg, rate_e'(b % 3));
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
