// tb_serializer: drives the serializer model like the waveform does, a new
// random word on every rising edge of clk_div16, and checks that clk_div16
// has a period of 16 slot clocks and that ppm_data carries the words back to
// back, lane 0 first, one lane per slot clock, with no gaps.
module tb_serializer;
  logic slot_clk = 0, rst_n = 0;
  logic [15:0] par_data = '0;
  logic ppm_data, clk_div16;
  int checks = 0, failures = 0;

  serializer dut (.*);
  always #1 slot_clk = ~slot_clk;

  bit exp_q [$];
  int last_rise = -1, cyc = 0, matched = 0;

  initial begin
    repeat (20000) @(posedge slot_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count slot clocks, check the divided clock period
  always @(posedge slot_clk) cyc++;
  always @(posedge clk_div16) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 16) begin
        failures++;
        $display("FAIL clk_div16 period %0d", cyc - last_rise);
      end
    end
    last_rise = cyc;
    // launch the next word
    par_data <= 16'($urandom);
  end
  // record what was launched, lane 0 first
  always @(negedge clk_div16) if (rst_n) for (int l = 0; l < 16; l++) exp_q.push_back(par_data[l]);

  initial begin
    repeat (4) @(posedge slot_clk);
    rst_n = 1;
    // the first recorded word leaves from the next slot clock on
    @(negedge clk_div16);
    @(negedge slot_clk);
    while (matched < 16 * 200) begin
      @(negedge slot_clk);
      begin
        checks++;
        if (ppm_data != exp_q.pop_front()) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d", matched);
        end
        matched++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
