// tb_nr_counter: checks the counter output against the number of ones for
// every count in [0, N] with random vectors, for N = 16 (5 output bits), and
// N = 7 and N = 1 to cover a non-power-of-two size and the single-gate case.
`include "tb/sym_vec.svh"
module tb_nr_counter;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] x0; logic [4:0] s0;
  logic [6:0]  x1; logic [3:0] s1;
  logic [0:0]  x2; logic [0:0] s2;

  nr_counter dut0 (.x(x0), .s(s0));
  nr_counter #(.N(7)) dut1 (.x(x1), .s(s1));
  nr_counter #(.N(1)) dut2 (.x(x2), .s(s2));

  task automatic chk(string nm, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", nm, got, exp);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 30; rep++) begin
      for (int c = 0; c <= 16; c++) begin
        `SYM_RANDOM_VECTOR(16, c, x0)
        #1;
        chk("n16", int'(s0), c);
      end
      for (int c = 0; c <= 7; c++) begin
        `SYM_RANDOM_VECTOR(7, c, x1)
        #1;
        chk("n7", int'(s1), c);
      end
    end
    x2 = 1'b0; #1; chk("n1", int'(s2), 0);
    x2 = 1'b1; #1; chk("n1", int'(s2), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
