// cmcu_cm_tb: reads every word of the control memory and checks it against the example
// microprogram written out node by node from the flow-chart.
//
// Expected content, address T1T2T3T4: y0, y1..y5, yE
//   operational MIs: y0 = 1 and the node's microoperations; b10 also has yE = 1
//   additional MIs O1..O3: y0 = 0, class code 0 in the first FY bit; O4: class code 1
//   free words 1110, 1111: all zero.
// Also checks that the output is all zeros while fetch = 0.
module cmcu_cm_tb;
  logic [1:4] addr;
  logic fetch;
  logic [6:0] q;
  int checks = 0, failures = 0;

  cmcu_cm dut (.addr(addr), .fetch(fetch), .q(q));

  // Expected word: {y0, y1, y2, y3, y4, y5, yE}
  function automatic logic [6:0] expected(input int a);
    case (a)
      0:  return 7'b1_10000_0;  // b1 y1
      1:  return 7'b0_00000_0;  // O1 B1
      2:  return 7'b1_01100_0;  // b2 y2 y3
      3:  return 7'b1_00010_0;  // b3 y4
      4:  return 7'b1_01010_0;  // b4 y2 y4
      5:  return 7'b0_00000_0;  // O2 B1
      6:  return 7'b1_00100_0;  // b5 y3
      7:  return 7'b1_00010_0;  // b6 y4
      8:  return 7'b0_00000_0;  // O3 B1
      9:  return 7'b1_01001_0;  // b7 y2 y5
      10: return 7'b1_00100_0;  // b8 y3
      11: return 7'b0_10000_0;  // O4 B2
      12: return 7'b1_11000_0;  // b9 y1 y2
      13: return 7'b1_00100_1;  // b10 y3, end
      default: return 7'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = a[3:0];
      fetch = 1'b1;
      #1;
      checks++;
      if (q !== expected(a)) begin
        failures++;
        $display("FAIL addr=%b q=%b expected %b", addr, q, expected(a));
      end
      fetch = 1'b0;
      #1;
      checks++;
      if (q !== 7'b0) begin
        failures++;
        $display("FAIL addr=%b fetch=0 q=%b", addr, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
