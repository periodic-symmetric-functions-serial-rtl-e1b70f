// threshold_gate: one linear threshold ("neural") gate.
//
// The gate outputs 1 when  sum_i WX[i]*x[i] + sum_{j<NF} WF[j]*f[j] - PSI >= 0
// and 0 otherwise: a summation device followed by a threshold element, with no
// learning. The inputs are split in two groups because every gate in the
// networks of this library receives the whole data vector x (with the same
// weights on every level) and the outputs f of the gates on the levels above
// it. WF holds the output weight of every gate of the network (NFMAX entries);
// a gate on level NF uses only the first NF of them and f[NF..] is ignored.
//
// Purely combinational. Weights and threshold are signed integers fixed at
// elaboration; the sum is kept in 32 bits, which covers the weight and fan-in
// ranges used here (weights up to n^2, fan-in up to (n+3) log n).
module threshold_gate #(
  parameter int NX           = 2,
  parameter int WX [NX]      = '{default: 1},
  parameter int NFMAX        = 1,
  parameter int NF           = 0,
  parameter int WF [NFMAX]   = '{default: 0},
  parameter int PSI          = 1
) (
  input  logic [NX-1:0]    x,
  input  logic [NFMAX-1:0] f,
  output logic             y
);

  int sum;

  always_comb begin
    sum = -PSI;
    for (int i = 0; i < NX; i++)
      if (x[i]) sum += WX[i];
    for (int j = 0; j < NF; j++)
      if (f[j]) sum += WF[j];
    y = (sum >= 0);
  end

endmodule
