// tb_optical_slice_top: end-to-end test of the optical transmit slice at its
// default size (15120-bit codewords, 8920-bit frames, 6 x 4 channel
// interleaver), with a 2 GHz slot clock and the waveform clocked from the
// serializer's divided clock. Three runs, each from reset:
//  1. PRBS data, rate 1/2, M = 16, slot repeat 4: the serial ppm_data line must
//     carry, slot for slot, the reference model's sequence for the first
//     codeword, from the first valid word on.
//  2. rate 1/3, M = 64, symbol repeat 2, then rate 2/3 and M = 32 written while
//     the waveform runs: later codewords must be coded at the new rate and
//     mapped at the new order.
//  3. M = 4 with no repeats, which the bit-serial chain cannot feed: the
//     controller's status register must report an underflow.
// It counts, and requires at least once, each mechanism: frame markers,
// codeword markers, backpressure on the data source, symbol and slot repeats,
// a rate change and an order change taking effect, and an underflow.
module tb_optical_slice_top;
  timeunit 1ps;
  timeprecision 1ps;
  import scppm_pkg::*;
  import scppm_ref_pkg::*;

  logic slot_clk = 0, rst_n = 1;
  logic reg_we = 0;
  logic [2:0] reg_addr = 0;
  logic [15:0] reg_wdata = 0, reg_rdata;
  logic ppm_data, clk_div16;
  logic [15:0] slots;
  logic slots_valid, underflow;
  int checks = 0, failures = 0;

  optical_slice_top dut (.*);
  always #250 slot_clk = ~slot_clk;  // 2 GHz

  // mechanism counters
  int n_tfsm = 0, n_csm = 0, n_stall = 0, n_symrep = 0, n_slotrep = 0;
  int n_rate_change = 0, n_order_change = 0, n_underflow = 0;
  rate_e last_rate;
  logic [3:0] last_m;
  logic seen_rate = 0, seen_m = 0;

  always @(posedge clk_div16) if (rst_n) begin
    if (dut.u_waveform.tf_v && dut.u_waveform.tf_r && dut.u_waveform.u_tfsm.marker_phase &&
        dut.u_waveform.u_tfsm.cnt == 0) n_tfsm++;
    if (dut.u_waveform.csm_v && dut.u_waveform.csm_r && dut.u_waveform.csm_d.first) n_csm++;
    if (dut.u_waveform.gen_v && !dut.u_waveform.gen_r) n_stall++;
    if (dut.u_waveform.rep_v && dut.u_waveform.rep_r && dut.u_waveform.u_srep.left > 1) n_symrep++;
    if (dut.u_waveform.cfg.slot_reps > 1 && slots_valid) n_slotrep++;
    if (underflow) n_underflow++;
    if (dut.u_waveform.enc_v && dut.u_waveform.enc_r && dut.u_waveform.enc_d.first) begin
      if (seen_rate && dut.u_waveform.enc_d.rate != last_rate) n_rate_change++;
      last_rate = dut.u_waveform.enc_d.rate;
      seen_rate = 1;
    end
    if (dut.u_waveform.map_v && dut.u_waveform.map_r && dut.u_waveform.map_d.first) begin
      if (seen_m && dut.u_waveform.map_d.log2m != last_m) n_order_change++;
      last_m = dut.u_waveform.map_d.log2m;
      seen_m = 1;
    end
  end

  initial begin
    #4000000000;  // 4 ms
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int d);
    @(negedge clk_div16); reg_we = 1; reg_addr = 3'(a); reg_wdata = 16'(d);
    @(negedge clk_div16); reg_we = 0;
  endtask

  // rst_n starts high so that this falling edge reaches the asynchronous resets
  task automatic restart();
    @(negedge slot_clk); rst_n = 0;
    repeat (4) @(negedge slot_clk);
    rst_n = 1;
    seen_rate = 0;
    seen_m = 0;
  endtask

  task automatic serial_run();
    bitq_t exp_q;
    int bad = 0, n = 0;
    exp_q = ref_slots(SRC_PRBS23, 8'h00, RATE_1_2, 4, 1, 4, 1, 8920, 6, 4);
    restart();
    wr(3, RATE_1_2); wr(4, 4); wr(6, 4); wr(0, 1);
    // the first valid word is loaded at a falling edge of clk_div16 and leaves
    // from the next slot clock on
    do @(negedge clk_div16); while (!slots_valid);
    @(negedge slot_clk);
    while (exp_q.size() > 0) begin
      @(negedge slot_clk);
      checks++;
      n++;
      if (ppm_data != exp_q.pop_front()) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL serial slot %0d got %0b", n, ppm_data);
      end
    end
    $display("run 1: %0d serial slots checked, %0d wrong", n, bad);
  endtask

  task automatic reconfig_run();
    int cw = 0;
    restart();
    wr(4, 6); wr(5, 2); wr(0, 1);
    // wait until the first codeword is being encoded, then change rate and M
    do @(posedge clk_div16); while (!(dut.u_waveform.enc_v && dut.u_waveform.enc_d.first));
    wr(3, RATE_2_3);
    // and once the first codeword reaches the symbol mapper, change M
    do @(posedge clk_div16); while (!(dut.u_waveform.map_v && dut.u_waveform.map_d.first));
    wr(4, 5);
    // the new order reaches the mapper one codeword after the new rate reaches
    // the encoder, as the code interleaver holds a whole codeword
    while ((n_rate_change == 0 || n_order_change == 0) && cw < 200000) begin
      @(posedge clk_div16);
      cw++;
    end
    checks++;
    if (n_rate_change == 0 || n_order_change == 0 || last_rate != RATE_2_3 || last_m != 4'd5) begin
      failures++;
      $display("FAIL reconfiguration: rate changes %0d, order changes %0d", n_rate_change, n_order_change);
    end
  endtask

  task automatic underflow_run();
    restart();
    wr(4, 2); wr(0, 1);
    repeat (40000) @(posedge clk_div16);
    @(negedge clk_div16); reg_addr = 3'd7;
    #1 checks++;
    if (reg_rdata[0] != 1'b1) begin
      failures++;
      $display("FAIL underflow status not set");
    end
    wr(7, 1);
    wr(0, 0);
  endtask

  initial begin
    serial_run();
    reconfig_run();
    underflow_run();
    $display("mechanisms: tfsm %0d csm %0d stalls %0d symbol repeats %0d slot repeats %0d",
             n_tfsm, n_csm, n_stall, n_symrep, n_slotrep);
    $display("            rate changes %0d order changes %0d underflow clocks %0d",
             n_rate_change, n_order_change, n_underflow);
    if (n_tfsm == 0)         begin failures++; $display("FAIL no frame marker"); end
    if (n_csm == 0)          begin failures++; $display("FAIL no codeword marker"); end
    if (n_stall == 0)        begin failures++; $display("FAIL no backpressure"); end
    if (n_symrep == 0)       begin failures++; $display("FAIL no symbol repeat"); end
    if (n_slotrep == 0)      begin failures++; $display("FAIL no slot repeat"); end
    if (n_rate_change == 0)  begin failures++; $display("FAIL no rate change"); end
    if (n_order_change == 0) begin failures++; $display("FAIL no order change"); end
    if (n_underflow == 0)    begin failures++; $display("FAIL no underflow"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
