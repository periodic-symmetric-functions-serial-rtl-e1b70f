// tb_periodic_symmetric_net: checks the periodic network for every count of
// ones x in [0, N], with several random input vectors per count, in four
// configurations (parity, the default example, a wide interval and a long
// period). Reference: F(x) = 1 iff x >= A and (x - A) mod T < B - A.
// Also checks the gate count against 1 + ceil(log(ceil((N-A)/T) + 1)).
`include "tb/sym_vec.svh"
module tb_periodic_symmetric_net;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_f(int x, int a, int b, int t);
    return (x >= a) && (((x - a) % t) < (b - a));
  endfunction

  logic [15:0] x0; logic y0; logic [3:0] g0;   // default N=16 A=2 B=4 T=5: R=3
  logic [15:0] x1; logic y1; logic [4:0] g1;   // parity, N=16: R=1+ceil(log(8+1))=5
  logic [20:0] x2; logic y2; logic [2:0] g2;   // N=21 A=3 B=7 T=6
  logic [11:0] x3; logic y3; logic [2:0] g3;   // N=12 A=0 B=5 T=9: R=1+ceil(log(2+1))=3

  periodic_symmetric_net dut0 (.x(x0), .y(y0), .g(g0[2:0]));
  periodic_symmetric_net #(.N(16), .A(1), .B(2), .T(2)) dut1 (.x(x1), .y(y1), .g(g1));
  periodic_symmetric_net #(.N(21), .A(3), .B(7), .T(6)) dut2 (.x(x2), .y(y2), .g(g2));
  periodic_symmetric_net #(.N(12), .A(0), .B(5), .T(9)) dut3 (.x(x3), .y(y3), .g(g3));
  assign g0[3] = 1'b0;

  task automatic chk(string nm, bit got, bit exp, int x);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%0d got %b expected %b", nm, x, got, exp);
    end
  endtask

  initial begin
    // gate counts (expected values computed by hand from the size formula)
    chk("R0", $bits(dut0.g) == 3, 1, 0);
    chk("R1", $bits(dut1.g) == 5, 1, 0);
    chk("R2", $bits(dut2.g) == 3, 1, 0);
    chk("R3", $bits(dut3.g) == 3, 1, 0);
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c <= 16; c++) begin
        `SYM_RANDOM_VECTOR(16, c, x0)
        `SYM_RANDOM_VECTOR(16, c, x1)
        #1;
        chk("dflt", y0, ref_f(c, 2, 4, 5), c);
        chk("parity", y1, ^x1, c);
        // with T=2 the upper gates of the parity network are counter bits
        chk("parity_g", g1[3], c[1], c);
        chk("parity_g", g1[2], c[2], c);
      end
      for (int c = 0; c <= 21; c++) begin
        `SYM_RANDOM_VECTOR(21, c, x2)
        #1;
        chk("wide", y2, ref_f(c, 3, 7, 6), c);
      end
      for (int c = 0; c <= 12; c++) begin
        `SYM_RANDOM_VECTOR(12, c, x3)
        #1;
        chk("long", y3, ref_f(c, 0, 5, 9), c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
