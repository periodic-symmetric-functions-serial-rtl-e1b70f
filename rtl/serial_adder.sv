// serial_adder: delta-bit serial adder of two N-bit operands, LSB block first,
// built around one pipelined threshold counter.
//
// Each operand is split into ceil(N/DELTA) blocks of DELTA bits. Every cycle
// one pair of blocks enters: the counter adds a_blk (bit i weight 2^i), b_blk
// (bit i weight 2^i) and a carry-in (weight 1) into a DELTA+1 bit sum with
// DELTA+1 gates on DELTA+1 pipeline levels. The first level produces the
// block's carry-out one stage after the block enters, and it is fed back into
// the carry-in latch as the next block pair is loaded, so blocks stream at one
// per cycle. For the first block of an addition (in_first) the carry-in latch
// takes the cin port instead.
//
// Interface: in_valid/in_first/a_blk/b_blk/cin per block. A cycle with
// in_valid low is a bubble; the carry of the last loaded block is kept.
// Result: out_valid with out_sum (the DELTA sum bits of the block) and
// out_carry (its carry-out: sum bit N of the addition for the last block),
// tagged with out_first. Latency DELTA+1 cycles, so an N-bit addition takes
// DELTA + N/DELTA cycles from the first block load to the last result.
//
// Latch count (besides valid and tag bits): 2*DELTA+1 input latches,
// 2*DELTA+1+i between levels i-1 and i, DELTA+1 output latches, as in the
// document. DELTA = K*ceil(log N) keeps the largest weight at 2^DELTA, i.e.
// polynomial in N. N = 32, K = 1 are example values.
module serial_adder
  import neural_pkg::*;
#(
  parameter int N     = 32,
  parameter int K     = 1,
  parameter int DELTA = K * ceil_log2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [DELTA-1:0] a_blk,
  input  logic [DELTA-1:0] b_blk,
  input  logic             cin,
  output logic             out_valid,
  output logic             out_first,
  output logic [DELTA-1:0] out_sum,
  output logic             out_carry
);

  localparam int NIN = 2 * DELTA + 1;
  localparam int R   = DELTA + 1;

  typedef int wvec_t [NIN];

  // x = {carry_in, b_blk, a_blk}
  function automatic wvec_t weights();
    wvec_t w;
    for (int i = 0; i < DELTA; i++) begin
      w[i]         = 1 << i;
      w[DELTA + i] = 1 << i;
    end
    w[2 * DELTA] = 1;
    return w;
  endfunction

  localparam wvec_t W = weights();

  logic [R-1:0]   cum [R];
  logic           carry_fb;
  logic [NIN-1:0] x;
  logic [R-1:0]   s;

  // carry-out of the block now in the input latch, from the first level
  assign carry_fb = cum[0][R-1];
  assign x        = {in_first ? cin : carry_fb, b_blk, a_blk};

  pipelined_counter #(.NIN(NIN), .W(W), .R(R), .TW(1)) u_cnt (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .x(x), .in_tag(in_first),
    .cum(cum),
    .out_valid(out_valid), .out_s(s), .out_tag(out_first)
  );

  assign out_sum   = s[DELTA-1:0];
  assign out_carry = s[DELTA];

endmodule
