// cmcu_tf_tb: random test of the fetch flip-flop TF.
//
// Drives set (Start) and reset (yE) at random and checks after every rising edge that
// Fetch is set by s, cleared by r when s is low, and held otherwise; also checks reset.
module cmcu_tf_tb;
  logic clk = 0, rst_n = 1, s = 0, r = 0, q, model;
  int checks = 0, failures = 0, n_set = 0, n_clr = 0;

  cmcu_tf dut (.clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0;
    #1;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset q=%b", q); end
    model = 1'b0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      s = ($urandom_range(0, 3) == 0);
      r = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (s)      begin if (!model) n_set++; model = 1'b1; end
      else if (r) begin if (model) n_clr++; model = 1'b0; end
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d s=%b r=%b q=%b expected %b", i, s, r, q, model);
      end
    end
    checks++;
    if (n_set == 0 || n_clr == 0) begin failures++; $display("FAIL never set or cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
