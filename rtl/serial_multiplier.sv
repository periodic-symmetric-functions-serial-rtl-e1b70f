// serial_multiplier: block-serial N x N multiplier that reduces the partial
// product matrix L = ceil(log N) columns at a time with one pipelined
// threshold counter.
//
// The 2N-column partial-product matrix (row i = A*b_i shifted by i) is cut into
// NB = ceil(2N/L) blocks of L columns. Block j holds the N*L bits
// a_(jL+c-i) & b_i (column c weight 2^c) plus the L carry bits of block j-1
// (weight 2^c for carry c): at most (N+1)(2^L - 1) <= N^2 - 1 for N = 2^L,
// which fits in 2L bits. A (N+1)L-input counter with 2L gate levels
// (pipelined_counter) sums each block; its low L bits are product bits
// jL .. jL+L-1 and its high L bits, produced by the first L levels, are fed
// back as the carries of block j+1. Because the counter yields the MSBs first,
// the next block can enter L cycles after the previous one, when its carries
// are complete, so a product takes L*NB + L cycles (2N + log N when L divides
// 2N).
//
// Operands arrive LSB first, L bits of each per block: blocks 0..NBI-1
// (NBI = ceil(N/L)) take a_blk/b_blk, later blocks only reduce the stored
// operands. Block j needs operand bits up to jL+L-1 only, so the product can
// start with the first operand block. The partial products are plain AND gates.
//
// Handshake: an operand block is accepted when in_valid and in_ready are both
// high; in_ready rises at the earliest cycle the next block can enter. If the
// operand block is late, the carries are held in a latch until it comes. The
// first block of a new product may follow the last block of the previous one
// in the next cycle. Results: out_valid with out_blk (L product bits, LSB
// block first), out_first and out_last marking the first and last block.
// N = 32 is an example size; L follows the document (log N columns).
module serial_multiplier
  import neural_pkg::*;
#(
  parameter int N = 32,
  parameter int L = ceil_log2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [L-1:0] a_blk,
  input  logic [L-1:0] b_blk,
  output logic         busy,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [L-1:0] out_blk
);

  localparam int NBI = ceil_div(N, L);        // operand blocks
  localparam int NB  = ceil_div(2 * N, L);    // product blocks
  localparam int R   = 2 * L;                 // counter bits and levels
  localparam int NIN = N * L + L;             // matrix block bits + carries
  localparam int AW  = NBI * L;               // operand latch width
  localparam int JW  = $clog2(NB + 1);
  localparam int CW  = $clog2(L + 1);

  typedef int wvec_t [NIN];

  // index i*L + c: row i, column c; index N*L + c: carry c
  function automatic wvec_t weights();
    wvec_t w;
    for (int i = 0; i <= N; i++)
      for (int c = 0; c < L; c++)
        w[i * L + c] = 1 << c;
    return w;
  endfunction

  localparam wvec_t W = weights();

  logic [JW-1:0]  j_q, cur_j;
  logic [CW-1:0]  since_q;       // cycles since the last block entered
  logic [AW-1:0]  a_q, b_q, a_eff, b_eff;
  logic [L-1:0]   carry_q, carry_now;
  logic [R-1:0]   cum [R];
  logic [NIN-1:0] x;
  logic [R-1:0]   s;
  logic [1:0]     tag_in, tag_out;
  logic           need_in, can_load, load, last_blk;

  assign cur_j    = busy ? j_q : '0;
  assign need_in  = (int'(cur_j) < NBI);
  assign can_load = !busy || (int'(since_q) >= L - 1);
  assign in_ready = can_load && need_in;
  assign load     = can_load && (!need_in || in_valid);
  assign last_blk = (int'(cur_j) == NB - 1);

  // carries of the previous block: straight from the counter when it has just
  // produced them, otherwise from the latch
  assign carry_now = (cur_j == '0) ? '0 :
                     (int'(since_q) == L - 1) ? cum[L-1][R-1:L] : carry_q;

  always_comb begin
    a_eff = (cur_j == '0) ? '0 : a_q;
    b_eff = (cur_j == '0) ? '0 : b_q;
    if (need_in) begin
      a_eff |= AW'(a_blk) << (int'(cur_j) * L);
      b_eff |= AW'(b_blk) << (int'(cur_j) * L);
    end
  end

  // partial products of block cur_j
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int c = 0; c < L; c++) begin
        automatic int k = int'(cur_j) * L + c - i;
        x[i * L + c] = (k >= 0 && k < N) ? (a_eff[k] & b_eff[i]) : 1'b0;
      end
    for (int c = 0; c < L; c++) x[N * L + c] = carry_now[c];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      j_q     <= '0;
      since_q <= '0;
      a_q     <= '0;
      b_q     <= '0;
      carry_q <= '0;
    end else begin
      if (int'(since_q) == L - 1) carry_q <= cum[L-1][R-1:L];
      if (load) begin
        since_q <= '0;
        a_q     <= a_eff;
        b_q     <= b_eff;
        j_q     <= cur_j + 1'b1;
        busy    <= !last_blk;
      end else if (int'(since_q) < L) begin
        since_q <= since_q + 1'b1;
      end
    end
  end

  assign tag_in = {last_blk, cur_j == '0};

  pipelined_counter #(.NIN(NIN), .W(W), .R(R), .TW(2)) u_cnt (
    .clk(clk), .rst_n(rst_n),
    .in_valid(load), .x(x), .in_tag(tag_in),
    .cum(cum),
    .out_valid(out_valid), .out_s(s), .out_tag(tag_out)
  );

  assign out_blk   = s[L-1:0];
  assign out_first = tag_out[0];
  assign out_last  = tag_out[1];

  // the product fits in 2N bits, so nothing may carry out of the last block
  always_ff @(posedge clk)
    if (rst_n && out_valid && out_last)
      assert (s[R-1:L] == '0)
        else $error("serial_multiplier: carry out of the last product block");

  initial begin
    assert (N <= (1 << L))
      else $error("serial_multiplier: a block sum must fit in 2L bits (N <= 2^L)");
  end

endmodule
