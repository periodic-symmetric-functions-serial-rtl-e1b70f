// kautz_net: R threshold gates in the feedforward level structure used by all
// combinational networks of this library (Kautz's parity network).
//
// Gate k (level k, k = 0..R-1) receives the data vector x with weights WX and
// the outputs of the gates on levels 0..k-1, the output of level j always
// entering with weight WF[j]. Its threshold is PSIV[k]. The output g[k] is the
// output of level k; the last level, g[R-1], is the network output.
//
// Combinational, depth R gates. The caller chooses the weights and thresholds
// (see periodic_symmetric_net, nr_counter).
module kautz_net #(
  parameter int NX         = 4,
  parameter int WX [NX]    = '{default: 1},
  parameter int R          = 2,
  parameter int WF [R]     = '{default: -2},
  parameter int PSIV [R]   = '{default: 1}
) (
  input  logic [NX-1:0] x,
  output logic [R-1:0]  g
);

  for (genvar k = 0; k < R; k++) begin : lvl
    // outputs of levels 0..k-1, bit j = level j
    logic [R-1:0] above;
    logic         y;
    if (k == 0) begin : first
      assign above = '0;
    end else begin : later
      assign above = lvl[k-1].above | (R'(lvl[k-1].y) << (k - 1));
    end
    threshold_gate #(
      .NX(NX), .WX(WX), .NFMAX(R), .NF(k), .WF(WF), .PSI(PSIV[k])
    ) u_gate (
      .x(x), .f(above), .y(y)
    );
    assign g[k] = y;
  end

endmodule
