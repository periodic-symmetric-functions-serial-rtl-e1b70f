// symmetric_cutoff_net: a symmetric function that follows a periodic pattern
// up to x = K and is constant beyond it, built as a network for the
// restriction to [0, K] plus one cutoff gate.
//
// For x = sum(x_i) <= K the output is the periodic function of
// periodic_symmetric_net (1 on [A+kT, B+kT-1]); for x > K it keeps the value
// it has at x = K. The restriction to [0, K] is implemented by a Kautz network
// sized for K inputs, 1 + ceil(log(ceil((K-A)/T) + 1)) gates, which on its own
// would produce spurious transitions above K. An extra gate with threshold
// K+1 (all inputs weight 1) detects x > K and drives one more input of the
// last gate with weight +WCUT when the value at K is 1, or -WCUT when it is 0,
// forcing the output for every x in (K, N]. The document gives this weight as
// n; WCUT defaults to N.
//
// Combinational, depth max(R_K, 2) gates. Example defaults: N=16, A=2, B=4,
// T=5, K=12.
module symmetric_cutoff_net
  import neural_pkg::*;
#(
  parameter int N    = 16,
  parameter int A    = 2,
  parameter int B    = 4,
  parameter int T    = 5,
  parameter int K    = 12,
  parameter int WCUT = N,
  localparam int RK  = periodic_gates(K, A, T)
) (
  input  logic [N-1:0] x,
  output logic         y,
  output logic         cut   // cutoff gate output: x > K
);

  // value of the periodic pattern at x = K decides the sign of the cutoff weight
  localparam bit VAL_K = (K >= A) && (((K - A) % T) < (B - A));

  typedef int rvec_t [RK];

  function automatic rvec_t thresholds();
    rvec_t p;
    p[RK-1] = A;
    if (RK >= 2) p[RK-2] = B;
    for (int i = RK - 3; i >= 0; i--)
      p[i] = p[i+1] + T * (1 << (RK - (i + 3)));
    return p;
  endfunction

  // index j < RK-1: output weight of gate j+1; index RK-1: cutoff gate weight
  function automatic rvec_t in_weights();
    rvec_t w;
    for (int i = 0; i < RK - 1; i++)
      w[i] = -T * (1 << (RK - (i + 2)));
    w[RK-1] = VAL_K ? WCUT : -WCUT;
    return w;
  endfunction

  localparam rvec_t PSIV = thresholds();
  localparam rvec_t WF   = in_weights();
  localparam int    WX [N] = '{default: 1};
  localparam int    W0 [1] = '{0};

  // cutoff gate: threshold K+1
  threshold_gate #(.NX(N), .WX(WX), .NFMAX(1), .NF(0), .WF(W0), .PSI(K + 1)) u_cut (
    .x(x), .f(1'b0), .y(cut)
  );

  for (genvar k = 0; k < RK; k++) begin : lvl
    logic [RK-1:0] above;
    logic          yk;
    if (k == 0) begin : first
      assign above = '0;
    end else begin : later
      assign above = lvl[k-1].above | (RK'(lvl[k-1].yk) << (k - 1));
    end
    if (k == RK - 1) begin : last
      // last gate: all gates above plus the cutoff gate (slot RK-1)
      threshold_gate #(.NX(N), .WX(WX), .NFMAX(RK), .NF(RK), .WF(WF), .PSI(PSIV[k])) u_gate (
        .x(x), .f(above | (RK'(cut) << (RK - 1))), .y(yk)
      );
    end else begin : inner
      threshold_gate #(.NX(N), .WX(WX), .NFMAX(RK), .NF(k), .WF(WF), .PSI(PSIV[k])) u_gate (
        .x(x), .f(above), .y(yk)
      );
    end
  end

  assign y = lvl[RK-1].yk;

  initial begin
    assert (A >= 0 && A < B && B <= A + T && K < N)
      else $error("symmetric_cutoff_net: need 0 <= A < B <= A + T and K < N");
  end

endmodule
