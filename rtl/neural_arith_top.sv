// neural_arith_top: the threshold-gate designs of this library side by side.
//
// Four combinational symmetric-function networks and two pipelined serial
// arithmetic units, each with its own ports:
//   - periodic_symmetric_net: one periodic symmetric function (Kautz network)
//   - symmetric_cutoff_net:   a periodic pattern cut off above x = K
//   - multi_periodic_net:     OR of two periodic subfunctions
//   - nr_counter:             n|(1+ceil(log n)) counter
//   - serial_adder:           delta-bit serial adder, delta = ceil(log N_ADD)
//   - serial_multiplier:      block-serial multiplier, log N_MUL columns/block
// The networks are purely combinational; the adder and multiplier share one
// clock and a synchronous active-low reset. See each module for its timing.
// The function parameters of the networks are example values.
module neural_arith_top
  import neural_pkg::*;
#(
  parameter int N_FN  = 16,
  parameter int N_ADD = 32,
  parameter int N_MUL = 32,
  localparam int DELTA = ceil_log2(N_ADD),
  localparam int LMUL  = ceil_log2(N_MUL),
  localparam int RCNT  = counter_bits(N_FN),
  localparam int RPER  = periodic_gates(N_FN, 2, 5)
) (
  input  logic               clk,
  input  logic               rst_n,
  // periodic symmetric function (A=2, B=4, T=5)
  input  logic [N_FN-1:0]    per_x,
  output logic               per_y,
  output logic [RPER-1:0]    per_g,
  // cut-off periodic function (A=2, B=4, T=5, K=12)
  input  logic [N_FN-1:0]    cut_x,
  output logic               cut_y,
  output logic               cut_active,
  // OR of periodic subfunctions (1,2,4) and (3,5,7)
  input  logic [N_FN-1:0]    multi_x,
  output logic               multi_y,
  output logic [1:0]         multi_sub,
  // counter
  input  logic [N_FN-1:0]    cnt_x,
  output logic [RCNT-1:0]    cnt_s,
  // serial adder
  input  logic               add_in_valid,
  input  logic               add_in_first,
  input  logic [DELTA-1:0]   add_a_blk,
  input  logic [DELTA-1:0]   add_b_blk,
  input  logic               add_cin,
  output logic               add_out_valid,
  output logic               add_out_first,
  output logic [DELTA-1:0]   add_out_sum,
  output logic               add_out_carry,
  // serial multiplier
  input  logic               mul_in_valid,
  output logic               mul_in_ready,
  input  logic [LMUL-1:0]    mul_a_blk,
  input  logic [LMUL-1:0]    mul_b_blk,
  output logic               mul_busy,
  output logic               mul_out_valid,
  output logic               mul_out_first,
  output logic               mul_out_last,
  output logic [LMUL-1:0]    mul_out_blk
);

  periodic_symmetric_net #(.N(N_FN), .A(2), .B(4), .T(5)) u_per (
    .x(per_x), .y(per_y), .g(per_g)
  );

  symmetric_cutoff_net #(.N(N_FN), .A(2), .B(4), .T(5), .K(12)) u_cut (
    .x(cut_x), .y(cut_y), .cut(cut_active)
  );

  localparam int MULTI_A [2] = '{1, 3};
  localparam int MULTI_B [2] = '{2, 5};
  localparam int MULTI_T [2] = '{4, 7};

  multi_periodic_net #(.N(N_FN), .L(2), .AV(MULTI_A), .BV(MULTI_B), .TV(MULTI_T)) u_multi (
    .x(multi_x), .y(multi_y), .sub(multi_sub)
  );

  nr_counter #(.N(N_FN)) u_cnt (
    .x(cnt_x), .s(cnt_s)
  );

  serial_adder #(.N(N_ADD)) u_add (
    .clk(clk), .rst_n(rst_n),
    .in_valid(add_in_valid), .in_first(add_in_first),
    .a_blk(add_a_blk), .b_blk(add_b_blk), .cin(add_cin),
    .out_valid(add_out_valid), .out_first(add_out_first),
    .out_sum(add_out_sum), .out_carry(add_out_carry)
  );

  serial_multiplier #(.N(N_MUL)) u_mul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(mul_in_valid), .in_ready(mul_in_ready),
    .a_blk(mul_a_blk), .b_blk(mul_b_blk),
    .busy(mul_busy),
    .out_valid(mul_out_valid), .out_first(mul_out_first),
    .out_last(mul_out_last), .out_blk(mul_out_blk)
  );

endmodule
