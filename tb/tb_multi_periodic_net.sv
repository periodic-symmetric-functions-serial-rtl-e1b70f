// tb_multi_periodic_net: checks the OR of periodic subfunctions for every
// count of ones, for the default pair and a three-subfunction configuration.
`include "tb/sym_vec.svh"
module tb_multi_periodic_net;
  int checks = 0, failures = 0;

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

  logic [15:0] x0; logic y0; logic [1:0] s0;
  logic [24:0] x1; logic y1; logic [2:0] s1;

  multi_periodic_net dut0 (.x(x0), .y(y0), .sub(s0));
  localparam int A3 [3] = '{2, 0, 5};
  localparam int B3 [3] = '{3, 1, 8};
  localparam int T3 [3] = '{6, 11, 9};
  multi_periodic_net #(.N(25), .L(3), .AV(A3), .BV(B3), .TV(T3)) dut1 (.x(x1), .y(y1), .sub(s1));

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
        chk("s0a", s0[0], ref_p(c, 1, 2, 4), c);
        chk("s0b", s0[1], ref_p(c, 3, 5, 7), c);
        chk("y0", y0, ref_p(c, 1, 2, 4) | ref_p(c, 3, 5, 7), c);
      end
      for (int c = 0; c <= 25; c++) begin
        `SYM_RANDOM_VECTOR(25, c, x1)
        #1;
        chk("y1", y1, ref_p(c, 2, 3, 6) | ref_p(c, 0, 1, 11) | ref_p(c, 5, 8, 9), c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
