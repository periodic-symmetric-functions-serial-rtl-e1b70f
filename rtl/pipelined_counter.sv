// pipelined_counter: weighted-input threshold counter with a latch stage in
// front of every gate level, the arithmetic core of the serial adder and the
// serial multiplier.
//
// It computes S = sum_i W[i]*x[i] as an R-bit binary number with R threshold
// gates. Level l (l = 0..R-1) has threshold 2^(R-1-l), sees the data vector
// with weights W and the bits already produced by the levels above it, level j
// entering with weight -2^(R-1-j); it produces bit S_(R-1-l), so the MSB is
// known one stage after the data enters and the LSB last. The sum must fit in
// R bits: sum(W) < 2^R.
//
// Stages: stage 0 is the input latch (NIN data bits), stage l holds the data
// and the l bits computed so far (NIN + l meaningful bits), and an output latch
// holds all R bits. Stage 0 loads x when in_valid is high and otherwise keeps
// its contents (and so the bits its gate produces); every later stage advances
// every cycle. A tag of TW bits travels alongside.
//
// Timing: data loaded at clock edge e appears on out_s at edge e + R; one new
// vector can be loaded per cycle. cum[l] shows, during each cycle, the bits
// known in stage l: bits R-1 .. R-1-l (the lower bits are 0). Feedback taken
// from cum[l] is how the adder and multiplier obtain their carries.
// Reset (active low, synchronous) clears all latches.
module pipelined_counter #(
  parameter int NIN      = 5,
  parameter int W [NIN]  = '{1, 2, 1, 2, 1},
  parameter int R        = 3,
  parameter int TW       = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [NIN-1:0] x,
  input  logic [TW-1:0]  in_tag,
  output logic [R-1:0]   cum [R],
  output logic           out_valid,
  output logic [R-1:0]   out_s,
  output logic [TW-1:0]  out_tag
);

  typedef int rvec_t [R];

  // output weight of level j, indexed by j
  function automatic rvec_t level_weights();
    rvec_t w;
    for (int j = 0; j < R; j++) w[j] = -(1 << (R - 1 - j));
    return w;
  endfunction

  localparam rvec_t WF = level_weights();

  for (genvar l = 0; l < R; l++) begin : st
    logic           v_q;
    logic [NIN-1:0] x_q;
    logic [R-1:0]   s_q;    // bit R-1-j: output of level j (j < l)
    logic [TW-1:0]  t_q;
    logic [R-1:0]   fb;     // bit j: output of level j (j < l)
    logic           y;

    if (l == 0) begin : load
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          v_q <= 1'b0;
          x_q <= '0;
          t_q <= '0;
        end else begin
          v_q <= in_valid;
          if (in_valid) begin
            x_q <= x;
            t_q <= in_tag;
          end
        end
      end
      assign s_q = '0;
    end else begin : shift
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          v_q <= 1'b0;
          x_q <= '0;
          s_q <= '0;
          t_q <= '0;
        end else begin
          v_q <= st[l-1].v_q;
          x_q <= st[l-1].x_q;
          s_q <= st[l-1].s_q | (R'(st[l-1].y) << (R - l));
          t_q <= st[l-1].t_q;
        end
      end
    end

    always_comb
      for (int j = 0; j < R; j++) fb[j] = s_q[R-1-j];

    threshold_gate #(
      .NX(NIN), .WX(W), .NFMAX(R), .NF(l), .WF(WF), .PSI(1 << (R - 1 - l))
    ) u_gate (
      .x(x_q), .f(fb), .y(y)
    );

    assign cum[l] = s_q | (R'(y) << (R - 1 - l));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_s     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= st[R-1].v_q;
      out_s     <= cum[R-1];
      out_tag   <= st[R-1].t_q;
    end
  end

  initial begin
    automatic longint total = 0;
    for (int i = 0; i < NIN; i++) total += longint'(W[i]);
    assert (total < (longint'(1) << R))
      else $error("pipelined_counter: weighted sum does not fit in R bits");
  end

endmodule
