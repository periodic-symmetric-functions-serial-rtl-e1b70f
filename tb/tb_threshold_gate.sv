// tb_threshold_gate: exhaustive check of one threshold gate with mixed-sign
// data weights and two of three feedback inputs in use, against the sum
// computed directly in the testbench.
module tb_threshold_gate;
  localparam int NX = 4;
  localparam int WX [NX] = '{3, -2, 5, 1};
  localparam int WF [3]  = '{-4, -1, 7};
  localparam int PSI     = 2;

  logic [NX-1:0] x;
  logic [2:0]    f;
  logic          y;
  int checks = 0, failures = 0;

  threshold_gate #(.NX(NX), .WX(WX), .NFMAX(3), .NF(2), .WF(WF), .PSI(PSI)) dut (
    .x(x), .f(f), .y(y)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (NX + 3)); v++) begin
      int sum;
      {f, x} = 7'(v);
      #1;
      // f[2] is beyond NF and must be ignored
      sum = 3 * x[0] - 2 * x[1] + 5 * x[2] + x[3] - 4 * f[0] - f[1] - PSI;
      checks++;
      if (y !== (sum >= 0)) begin
        failures++;
        $display("FAIL x=%b f=%b y=%b expected %b", x, f, y, sum >= 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
