// cmcu_ct_tb: random test of the address counter CT against a reference model.
//
// Drives start, fetch, y0 and phi at random for many clocks and checks after each rising
// edge that the address is START (on start), old + 1 modulo 16 (fetch and y0), phi (fetch
// and not y0) or unchanged (no fetch). Also checks the asynchronous reset.
module cmcu_ct_tb;
  logic clk = 0, rst_n = 1, start = 0, fetch = 0, y0 = 0;
  logic [1:4] phi = '0, t, model;
  int checks = 0, failures = 0;
  int n_inc = 0, n_load = 0, n_start = 0, n_hold = 0;

  cmcu_ct dut (.clk(clk), .rst_n(rst_n), .start(start), .fetch(fetch), .y0(y0), .phi(phi), .t(t));

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
    if (t !== 4'b0000) begin failures++; $display("FAIL reset t=%b", t); end
    model = '0;
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 15) == 0);
      fetch = $urandom_range(0, 7) != 0;
      y0    = $urandom_range(0, 1)[0];
      phi   = $urandom_range(0, 15)[3:0];
      @(posedge clk);
      if (start)      begin model = 4'b0000;  n_start++; end
      else if (!fetch) n_hold++;
      else if (y0)    begin model = model + 1; n_inc++; end
      else            begin model = phi;      n_load++; end
      #1;
      checks++;
      if (t !== model) begin
        failures++;
        $display("FAIL cycle %0d start=%b fetch=%b y0=%b phi=%b t=%b expected %b",
                 i, start, fetch, y0, phi, t, model);
      end
    end
    checks++;
    if (n_inc == 0 || n_load == 0 || n_start == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a case was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
