// tb_data_generation: checks the three data sources against a model kept as a
// plain bit array: the PRBS against the recurrence a[n] = a[n-23] ^ a[n-18]
// from 23 ones, the constant byte and the byte counter, MSB first. The sink
// pulls with a random ready, so backpressure is exercised too.
module tb_data_generation;
  import scppm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic enable = 0;
  src_e src = SRC_PRBS23;
  logic [7:0] const_byte = 8'hC3;
  bit_beat_t out;
  logic out_valid, out_ready = 0;
  int checks = 0, failures = 0;

  data_generation dut (.*);

  always #5 clk = ~clk;

  bit ref_bits [$];
  int n;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nbits);
    int got = 0;
    int stalls = 0;
    while (got < nbits) begin
      @(negedge clk);
      out_ready = ($urandom % 4) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out.b != ref_bits[got]) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d got %0b exp %0b", got, out.b, ref_bits[got]);
        end
        got++;
      end else if (out_valid) stalls++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
  endtask

  initial begin
    // PRBS reference
    for (int i = 0; i < 23; i++) ref_bits.push_back(1);
    for (int i = 23; i < 3000; i++) ref_bits.push_back(ref_bits[i-23] ^ ref_bits[i-18]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    run(3000);
    // constant source
    @(negedge clk); rst_n = 0; enable = 0; src = SRC_CONST; out_ready = 0;
    @(negedge clk); rst_n = 1; enable = 1;
    ref_bits.delete();
    for (int i = 0; i < 400; i++) ref_bits.push_back(const_byte[7 - (i % 8)]);
    run(400);
    // counting source
    @(negedge clk); rst_n = 0; enable = 0; src = SRC_COUNT; out_ready = 0;
    @(negedge clk); rst_n = 1; enable = 1;
    ref_bits.delete();
    for (int i = 0; i < 8 * 300; i++) begin
      n = (i / 8) % 256;
      ref_bits.push_back(n[7 - (i % 8)]);
    end
    run(8 * 300);
    // disable stops the stream
    @(negedge clk); enable = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
