// waveform_controller: the register file through which the host commands the
// waveform. It holds every parameter that the waveform can change while it runs
// (data source, code rate, PPM order, symbol repeats, slot repeats) and the
// enable of the data generator, and it collects a sticky underflow status from
// the output wrapper.
//
// Interface: a simple synchronous register port. On a clock edge with reg_we
// high, reg_wdata is written to register reg_addr. A write whose value is not
// one of the settings the waveform supports is ignored, so the configuration is
// always legal. reg_rdata shows register reg_addr in the same cycle. Map:
//   0 enable (bit 0)     1 data source (src_e)   2 constant byte
//   3 code rate (rate_e) 4 log2(M), 2..8         5 symbol repeats 1,2,3,4,8,16,32
//   6 slot repeats 1,2,4,8,16,1024               7 status: bit 0 sticky underflow,
//                                                  write 1 to clear
// The set of parameters and their legal values follow the document's table of
// reconfigurable parameters; the register map, the check on written values and
// the reset values (disabled, PRBS, rate 1/3, M = 16, no repeats) are this
// design's own. cfg changes one cycle after the write.
module waveform_controller
  import scppm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_we,
  input  logic [2:0]  reg_addr,
  input  logic [15:0] reg_wdata,
  output logic [15:0] reg_rdata,
  input  logic        underflow,  // one-cycle pulse from the wrapper
  output cfg_t        cfg
);

  logic underflow_seen;

  function automatic logic sym_reps_ok(logic [15:0] v);
    return v == 16'd1 || v == 16'd2 || v == 16'd3 || v == 16'd4 ||
           v == 16'd8 || v == 16'd16 || v == 16'd32;
  endfunction

  function automatic logic slot_reps_ok(logic [15:0] v);
    return v == 16'd1 || v == 16'd2 || v == 16'd4 || v == 16'd8 ||
           v == 16'd16 || v == 16'd1024;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.enable     <= 1'b0;
      cfg.src        <= SRC_PRBS23;
      cfg.const_byte <= 8'h00;
      cfg.rate       <= RATE_1_3;
      cfg.log2m      <= 4'd4;
      cfg.sym_reps   <= 6'd1;
      cfg.slot_reps  <= 11'd1;
      underflow_seen <= 1'b0;
    end else begin
      if (underflow) underflow_seen <= 1'b1;
      if (reg_we) begin
        case (reg_addr)
          3'd0: cfg.enable <= reg_wdata[0];
          3'd1: if (reg_wdata <= 16'd2) cfg.src <= src_e'(reg_wdata[1:0]);
          3'd2: cfg.const_byte <= reg_wdata[7:0];
          3'd3: if (reg_wdata <= 16'd2) cfg.rate <= rate_e'(reg_wdata[1:0]);
          3'd4: if (reg_wdata >= 16'd2 && reg_wdata <= 16'd8) cfg.log2m <= reg_wdata[3:0];
          3'd5: if (sym_reps_ok(reg_wdata)) cfg.sym_reps <= reg_wdata[5:0];
          3'd6: if (slot_reps_ok(reg_wdata)) cfg.slot_reps <= reg_wdata[10:0];
          3'd7: if (reg_wdata[0] && !underflow) underflow_seen <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_addr)
      3'd0:    reg_rdata = {15'd0, cfg.enable};
      3'd1:    reg_rdata = {14'd0, cfg.src};
      3'd2:    reg_rdata = {8'd0, cfg.const_byte};
      3'd3:    reg_rdata = {14'd0, cfg.rate};
      3'd4:    reg_rdata = {12'd0, cfg.log2m};
      3'd5:    reg_rdata = {10'd0, cfg.sym_reps};
      3'd6:    reg_rdata = {5'd0, cfg.slot_reps};
      default: reg_rdata = {15'd0, underflow_seen};
    endcase
  end

endmodule
