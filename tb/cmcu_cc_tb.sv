// cmcu_cc_tb: exhaustive check of the next-address circuit CC of the example.
//
// Drives every class code tau and every combination of x1..x3 and compares phi with the
// address of the flow-chart node that the transition formulae of the example select:
//   class B1 (tau = 0): x1 -> b2, /x1 x2 -> b5, /x1 /x2 -> b7
//   class B2 (tau = 1): x3 -> b9, /x3 -> b8
// with the natural addresses b2 = 0010, b5 = 0110, b7 = 1001, b8 = 1010, b9 = 1100.
// Also checks that exactly one product term is active each time.
module cmcu_cc_tb;
  logic [0:0] tau;
  logic [1:3] x;
  logic [1:4] phi;
  logic [4:0] term;
  int checks = 0, failures = 0;

  cmcu_cc dut (.tau(tau), .x(x), .phi(phi), .term(term));

  function automatic logic [1:4] expected(input logic t, input logic [1:3] xv);
    if (!t) begin
      if (xv[1])      return 4'b0010;
      else if (xv[2]) return 4'b0110;
      else            return 4'b1001;
    end else begin
      if (xv[3])      return 4'b1100;
      else            return 4'b1010;
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++) begin
      for (int v = 0; v < 8; v++) begin
        tau = t[0:0];
        x   = v[2:0];
        #1;
        checks++;
        if (phi !== expected(tau[0], x)) begin
          failures++;
          $display("FAIL tau=%0d x=%b phi=%b expected %b", tau, x, phi, expected(tau[0], x));
        end
        checks++;
        if (!$onehot(term)) begin
          failures++;
          $display("FAIL tau=%0d x=%b terms=%b not one-hot", tau, x, term);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
