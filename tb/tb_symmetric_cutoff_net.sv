// tb_symmetric_cutoff_net: checks the cut-off network for every count of ones
// in [0, N], for the default (pattern is 1 at K, so forced to 1 above K) and a
// configuration whose pattern is 0 at K (forced to 0 above K). Reference:
// F(x) = P(min(x, K)) with P(x) = 1 iff x >= A and (x - A) mod T < B - A.
`include "tb/sym_vec.svh"
module tb_symmetric_cutoff_net;
  int checks = 0, failures = 0;
  int forced_hi = 0, forced_lo = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_p(int x, int a, int b, int t);
    return (x >= a) && (((x - a) % t) < (b - a));
  endfunction

  logic [15:0] x0; logic y0, c0;   // N=16 A=2 B=4 T=5 K=12: P(12)=1
  logic [19:0] x1; logic y1, c1;   // N=20 A=1 B=3 T=4 K=11: P(11)=0

  symmetric_cutoff_net dut0 (.x(x0), .y(y0), .cut(c0));
  symmetric_cutoff_net #(.N(20), .A(1), .B(3), .T(4), .K(11)) dut1 (.x(x1), .y(y1), .cut(c1));

  task automatic chk(string nm, bit got, bit exp, int x);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%0d got %b expected %b", nm, x, got, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int c = 0; c <= 16; c++) begin
        `SYM_RANDOM_VECTOR(16, c, x0)
        #1;
        chk("hi", y0, ref_p(c > 12 ? 12 : c, 2, 4, 5), c);
        chk("cut0", c0, c > 12, c);
        // without the cutoff the restricted network would be 0 at x=13..16
        // for this pattern only at 13; count the cases the cutoff changes
        if (c > 12 && !ref_p(c, 2, 4, 5)) forced_hi++;
      end
      for (int c = 0; c <= 20; c++) begin
        `SYM_RANDOM_VECTOR(20, c, x1)
        #1;
        chk("lo", y1, ref_p(c > 11 ? 11 : c, 1, 3, 4), c);
        chk("cut1", c1, c > 11, c);
        if (c > 11 && ref_p(c, 1, 3, 4)) forced_lo++;
      end
    end
    checks++;
    if (forced_hi == 0 || forced_lo == 0) begin
      failures++;
      $display("FAIL cutoff never changed the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
