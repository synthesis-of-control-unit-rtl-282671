// cmcu_u2_tb: end-to-end test of the control unit running the example microprogram.
//
// A reference model walks the example flow-chart node by node (it knows nothing of
// addresses or memory words): b1; chains <b2 b3 b4>, <b5 b6>, <b7 b8>, <b9 b10>; one idle
// cycle for each additional microinstruction O1..O4 that closes a chain, in which the
// branch is decided from x (class B1: x1 -> b2, /x1 x2 -> b5, /x1 /x2 -> b7; class B2:
// x3 -> b9, /x3 -> b8). The logic conditions are random every cycle. Every cycle the
// unit's microoperations y, ou_en, fetch and y_end are compared with the model, and the
// length of each run (one cycle per node plus one per additional microinstruction) is
// checked against the model's count. Many runs are started back to back.
// Mechanisms counted, each must occur: counting up inside a chain, idle cycles of
// additional microinstructions, each of the five transition rows, end of the algorithm,
// and a restart by Start after an earlier run ended.
module cmcu_u2_tb;
  import cmcu_pkg::*;

  typedef enum int {ND_B1, ND_B2, ND_B3, ND_B4, ND_B5, ND_B6, ND_B7, ND_B8, ND_B9, ND_B10,
                    ND_O1, ND_O2, ND_O3, ND_O4, ND_END} node_t;

  localparam int RUNS = 300;

  logic clk = 0, rst_n = 1, start = 0;
  logic [1:L] x = '0;
  logic [1:N] y;
  logic ou_en, fetch, y_end;
  logic [1:R] addr;

  int checks = 0, failures = 0;
  int n_inc = 0, n_idle = 0, n_end = 0, n_restart = 0;
  int n_row [5] = '{0, 0, 0, 0, 0};

  cmcu_u2 dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y), .ou_en(ou_en),
               .fetch(fetch), .y_end(y_end), .addr(addr));

  always #5 clk = ~clk;

  // Microoperations of each operational node, y1..y5 from the left.
  function automatic logic [1:N] node_y(input node_t n);
    case (n)
      ND_B1:  return 5'b10000;
      ND_B2:  return 5'b01100;
      ND_B3:  return 5'b00010;
      ND_B4:  return 5'b01010;
      ND_B5:  return 5'b00100;
      ND_B6:  return 5'b00010;
      ND_B7:  return 5'b01001;
      ND_B8:  return 5'b00100;
      ND_B9:  return 5'b11000;
      ND_B10: return 5'b00100;
      default: return 5'b00000;
    endcase
  endfunction

  function automatic logic is_add(input node_t n);
    return n inside {ND_O1, ND_O2, ND_O3, ND_O4};
  endfunction

  // Next node of the flow-chart; row reports which transition row was used (-1: none).
  function automatic node_t next_node(input node_t n, input logic [1:L] xv, output int row);
    row = -1;
    case (n)
      ND_B1:  return ND_O1;
      ND_B2:  return ND_B3;
      ND_B3:  return ND_B4;
      ND_B4:  return ND_O2;
      ND_B5:  return ND_B6;
      ND_B6:  return ND_O3;
      ND_B7:  return ND_B8;
      ND_B8:  return ND_O4;
      ND_B9:  return ND_B10;
      ND_B10: return ND_END;
      ND_O1, ND_O2, ND_O3: begin
        if (xv[1])      begin row = 0; return ND_B2; end
        else if (xv[2]) begin row = 1; return ND_B5; end
        else            begin row = 2; return ND_B7; end
      end
      ND_O4: begin
        if (xv[3]) begin row = 3; return ND_B9; end
        else       begin row = 4; return ND_B8; end
      end
      default: return ND_END;
    endcase
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    node_t node;
    int row, cycles, nodes_seen, idles_seen;
    #1 rst_n = 0;
    @(negedge clk);
    check(fetch == 1'b0 && ou_en == 1'b0 && y == '0, "outputs after reset");
    rst_n = 1;
    for (int run = 0; run < RUNS; run++) begin
      // a few cycles with nothing running
      repeat ($urandom_range(1, 3)) begin
        @(negedge clk);
        x = $urandom_range(0, 7)[2:0];
        #1;
        check(fetch == 1'b0 && ou_en == 1'b0 && y == '0, "outputs while stopped");
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      if (run > 0) n_restart++;
      node = ND_B1;
      cycles = 0; nodes_seen = 0; idles_seen = 0;
      while (node != ND_END && cycles < 1000) begin
        x = $urandom_range(0, 7)[2:0];
        #1;
        check(fetch == 1'b1, "fetch high during run");
        check(ou_en == !is_add(node), "operational unit enable");
        check(y == node_y(node), $sformatf("microoperations y=%b node=%s", y, node.name()));
        check(y_end == (node == ND_B10), "yE");
        if (is_add(node)) begin idles_seen++; n_idle++; end
        else begin nodes_seen++; if (node != ND_B10) n_inc++; end
        node = next_node(node, x, row);
        if (row >= 0) n_row[row]++;
        cycles++;
        @(negedge clk);
      end
      n_end++;
      #1;
      check(fetch == 1'b0, "fetch low after yE");
      check(cycles == nodes_seen + idles_seen, "run length");
    end
    $display("runs=%0d increments=%0d idle_cycles=%0d rows=%0d/%0d/%0d/%0d/%0d ends=%0d restarts=%0d",
             RUNS, n_inc, n_idle, n_row[0], n_row[1], n_row[2], n_row[3], n_row[4], n_end, n_restart);
    check(n_inc > 0, "counting up happened");
    check(n_idle > 0, "additional microinstruction happened");
    for (int h = 0; h < 5; h++) check(n_row[h] > 0, $sformatf("transition row h%0d happened", h + 1));
    check(n_end > 0, "end of algorithm happened");
    check(n_restart > 0, "restart happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
