// channel_interleaver: convolutional interleaver of PPM symbols, spreading each
// codeword over time so that a channel fade hits symbols of many codewords.
//
// Symbols are dealt in turn to N rows; row r is a delay line of r*B symbols
// (row 0 has none), so a symbol written to row r leaves r*B*N symbol times
// later. All rows share one memory of B*N*(N-1)/2 symbols: row r holds the
// slice starting at B*r*(r-1)/2 and a pointer that runs round it; each symbol
// reads the oldest entry of its row and writes itself in its place. The row
// counter runs continuously; because N divides the symbols of every codeword
// (15120/log2(M)), each codeword starts on row 0. The first, log2m and csm
// fields stay with the symbol position, not with the delayed value, so codeword
// boundaries are unchanged by the interleaver. After reset the memory is
// cleared, one entry per clock, before the first symbol is taken; the delay
// lines start out holding symbol 0.
//
// Interface: valid/ready sym_beat_t streams; one symbol per clock, one register
// stage. N and B are fixed when the design is built, as in the document; their
// default values are this design's choice, since the document gives none.
module channel_interleaver
  import scppm_pkg::*;
#(
  parameter int unsigned N = 6,  // number of rows
  parameter int unsigned B = 4   // shift register length step
) (
  input  logic      clk,
  input  logic      rst_n,
  input  sym_beat_t in,
  input  logic      in_valid,
  output logic      in_ready,
  output sym_beat_t out,
  output logic      out_valid,
  input  logic      out_ready
);

  localparam int unsigned DEPTH = (B * N * (N - 1) / 2 > 0) ? B * N * (N - 1) / 2 : 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned RW    = (N > 1) ? $clog2(N) : 1;

  function automatic logic [AW-1:0] row_base(int unsigned r);
    return AW'(B * r * (r - (r > 0 ? 1 : 0)) / 2);
  endfunction

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] ptr [N];     // next entry of each row
  logic [RW-1:0] row;
  logic          init_busy;
  logic [AW-1:0] init_addr;
  logic [AW-1:0] addr;
  logic          fire;

  assign in_ready = !init_busy && (!out_valid || out_ready);
  assign fire     = in_ready && in_valid;
  assign addr     = row_base(int'(row)) + ptr[row];

  always_ff @(posedge clk) begin
    if (init_busy) begin
      mem[init_addr] <= 8'd0;
    end else if (fire && row != '0) begin
      mem[addr] <= in.sym;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
      row       <= '0;
      for (int r = 0; r < int'(N); r++) ptr[r] <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      if (init_busy) begin
        init_addr <= init_addr + AW'(1);
        if (init_addr == AW'(DEPTH - 1)) init_busy <= 1'b0;
      end
      if (out_valid && out_ready && !fire) out_valid <= 1'b0;
      if (fire) begin
        out_valid <= 1'b1;
        out       <= in;
        if (row != '0) begin
          out.sym  <= mem[addr];
          ptr[row] <= (32'(ptr[row]) == int'(row) * B - 1) ? '0 : ptr[row] + AW'(1);
        end
        row <= (32'(row) == N - 1) ? '0 : row + RW'(1);
      end
    end
  end

endmodule
