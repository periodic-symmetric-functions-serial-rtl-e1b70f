// periodic_symmetric_net: an n-input periodic symmetric Boolean function with
// two transitions per period, built from 1 + ceil(log(ceil((n-a)/T) + 1))
// threshold gates.
//
// The function is 1 exactly when the number of ones x = sum(x_i) satisfies
// x >= A and (x - A) mod T < B - A, i.e. on the intervals [A+kT, B+kT-1].
// Structure (Kautz network): R gates on R levels, each sees all n inputs with
// weight 1 and the outputs of every gate above it. With gates numbered
// i = 1..R from the top level down, the thresholds are
//   beta(R,R) = A,  beta(R-1,R-1) = B,
//   beta(i,i) = beta(i+1,i+1) + T*2^(R-(i+2))   for i = R-2 .. 1,
// and the output of gate i enters every later gate with weight -T*2^(R-(i+1)).
// The output gates 1..R-1 give coarser periodic functions; with T=2, A=1, B=2
// they are the bits of a counter (see nr_counter).
//
// Combinational, depth R gates. Weights, thresholds and R follow the document;
// the default function (N=16, A=2, B=4, T=5) is only an example.
module periodic_symmetric_net
  import neural_pkg::*;
#(
  parameter int N = 16,
  parameter int A = 2,
  parameter int B = 4,
  parameter int T = 5,
  localparam int R = periodic_gates(N, A, T)
) (
  input  logic [N-1:0] x,
  output logic         y,
  output logic [R-1:0] g    // g[k]: output of gate k+1 (level k)
);

  typedef int rvec_t [R];

  // Threshold of gate i+1, held at index i.
  function automatic rvec_t thresholds();
    rvec_t p;
    p[R-1] = A;
    if (R >= 2) p[R-2] = B;
    for (int i = R - 3; i >= 0; i--)
      p[i] = p[i+1] + T * (1 << (R - (i + 3)));
    return p;
  endfunction

  // Output weight of gate i+1, held at index i.
  function automatic rvec_t out_weights();
    rvec_t w;
    for (int i = 0; i < R; i++)
      w[i] = -T * (1 << (R - (i + 2) < 0 ? 0 : R - (i + 2)));
    return w;
  endfunction

  localparam rvec_t PSIV = thresholds();
  localparam rvec_t WF   = out_weights();
  localparam int    WX [N] = '{default: 1};

  kautz_net #(.NX(N), .WX(WX), .R(R), .WF(WF), .PSIV(PSIV)) u_net (
    .x(x), .g(g)
  );

  assign y = g[R-1];

  initial begin
    assert (A >= 0 && A < B && B <= A + T)
      else $error("periodic_symmetric_net: need 0 <= A < B <= A + T");
  end

endmodule
