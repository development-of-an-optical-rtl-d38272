// tb_waveform_controller: checks the register file of the waveform
// controller: reset values, writes of legal values, rejection of illegal ones,
// read-back, and the sticky underflow status with its write-1-to-clear.
module tb_waveform_controller;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic underflow = 0;
  cfg_t cfg;
  int checks = 0, failures = 0;

  waveform_controller dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(int a, int d);
    @(negedge clk); reg_we = 1; reg_addr = 3'(a); reg_wdata = 16'(d);
    @(negedge clk); reg_we = 0;
  endtask

  // register read: the read port is combinational
  task automatic rchk(string what, int a, int exp);
    @(negedge clk); reg_addr = 3'(a);
    #1 chk(what, longint'(reg_rdata), longint'(exp));
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset enable", cfg.enable, 0);
    chk("reset log2m", cfg.log2m, 4);
    chk("reset sym_reps", cfg.sym_reps, 1);
    chk("reset slot_reps", cfg.slot_reps, 1);
    chk("reset rate", cfg.rate, RATE_1_3);
    wr(0, 1);  chk("enable", cfg.enable, 1);
    wr(1, 2);  chk("src count", cfg.src, SRC_COUNT);
    wr(1, 3);  chk("src illegal kept", cfg.src, SRC_COUNT);
    wr(2, 'h5A); chk("const", cfg.const_byte, 'h5A);
    wr(3, 2);  chk("rate 2/3", cfg.rate, RATE_2_3);
    wr(3, 3);  chk("rate illegal kept", cfg.rate, RATE_2_3);
    wr(4, 8);  chk("M=256", cfg.log2m, 8);
    wr(4, 9);  chk("log2m 9 rejected", cfg.log2m, 8);
    wr(4, 1);  chk("log2m 1 rejected", cfg.log2m, 8);
    wr(4, 2);  chk("M=4", cfg.log2m, 2);
    wr(5, 3);  chk("sym reps 3", cfg.sym_reps, 3);
    wr(5, 5);  chk("sym reps 5 rejected", cfg.sym_reps, 3);
    wr(5, 32); chk("sym reps 32", cfg.sym_reps, 32);
    wr(6, 1024); chk("slot reps 1024", cfg.slot_reps, 1024);
    wr(6, 32); chk("slot reps 32 rejected", cfg.slot_reps, 1024);
    wr(6, 16); chk("slot reps 16", cfg.slot_reps, 16);
    rchk("read 4", 4, 2);
    rchk("read 5", 5, 32);
    rchk("read 6", 6, 16);
    rchk("read 2", 2, 'h5A);
    rchk("status clear", 7, 0);
    @(negedge clk); underflow = 1; @(negedge clk); underflow = 0;
    rchk("status sticky", 7, 1);
    repeat (3) @(negedge clk);
    rchk("status still set", 7, 1);
    wr(7, 1);
    rchk("status cleared", 7, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
