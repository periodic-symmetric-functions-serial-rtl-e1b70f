// multi_periodic_net: a symmetric function that is the OR of L periodic
// symmetric subfunctions, each with its own period and two transitions per
// period.
//
// Subfunction i is 1 on [AV[i] + k*TV[i], BV[i] + k*TV[i] - 1]. Each one is a
// periodic_symmetric_net of 1 + ceil(log(ceil((n-a_i)/T_i) + 1)) gates; one
// more threshold gate (weights 1, threshold 1) ORs their outputs, so size and
// depth stay logarithmic in n for a constant L.
//
// Combinational, depth max_i(R_i) + 1 gates. The construction follows the
// document; the default pair of subfunctions is only an example.
module multi_periodic_net #(
  parameter int N        = 16,
  parameter int L        = 2,
  parameter int AV [L]   = '{1, 3},
  parameter int BV [L]   = '{2, 5},
  parameter int TV [L]   = '{4, 7}
) (
  input  logic [N-1:0] x,
  output logic         y,
  output logic [L-1:0] sub    // subfunction outputs
);

  localparam int WONE [L] = '{default: 1};
  localparam int W0 [1]   = '{0};

  for (genvar i = 0; i < L; i++) begin : part
    periodic_symmetric_net #(.N(N), .A(AV[i]), .B(BV[i]), .T(TV[i])) u_net (
      .x(x), .y(sub[i]), .g()
    );
  end

  threshold_gate #(.NX(L), .WX(WONE), .NFMAX(1), .NF(0), .WF(W0), .PSI(1)) u_or (
    .x(sub), .f(1'b0), .y(y)
  );

endmodule
