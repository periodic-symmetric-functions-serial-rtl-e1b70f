// nr_counter: n|r counter, r = 1 + ceil(log n), built from r threshold gates.
//
// Output S is the number of ones among the n inputs, in binary. Every output
// bit S_i is a periodic symmetric function of period 2^(i+1), and one Kautz
// network produces all of them: the gate on level L (L = 0..r-1) has threshold
// 2^(r-1-L), sees all inputs with weight 1 and the outputs of the levels above
// it, level j entering with weight -2^(r-1-j). Level L then outputs S_(r-1-L):
// the MSB comes out of the first level and the LSB out of the last.
//
// Combinational, depth r gates (bit S_i is ready after r-i gate delays).
// The structure and weights follow the document; N = 16 is an example size.
module nr_counter
  import neural_pkg::*;
#(
  parameter int N = 16,
  localparam int R = counter_bits(N)
) (
  input  logic [N-1:0] x,
  output logic [R-1:0] s
);

  typedef int rvec_t [R];

  function automatic rvec_t thresholds();
    rvec_t p;
    for (int l = 0; l < R; l++) p[l] = 1 << (R - 1 - l);
    return p;
  endfunction

  function automatic rvec_t out_weights();
    rvec_t w;
    for (int l = 0; l < R; l++) w[l] = -(1 << (R - 1 - l));
    return w;
  endfunction

  localparam rvec_t PSIV = thresholds();
  localparam rvec_t WF   = out_weights();
  localparam int    WX [N] = '{default: 1};

  logic [R-1:0] g;

  kautz_net #(.NX(N), .WX(WX), .R(R), .WF(WF), .PSIV(PSIV)) u_net (
    .x(x), .g(g)
  );

  // level L carries bit R-1-L
  always_comb
    for (int l = 0; l < R; l++) s[R-1-l] = g[l];

endmodule
