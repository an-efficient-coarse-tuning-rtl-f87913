// tb_sigma_delta_mod - for 40 fractional words (including 0, 1 and 767)
// runs 768 steps and checks that exactly FRAC of them select N+1, that
// the running count never strays more than one from k x FRAC / 768, and
// that the output only moves on `step`.
`timescale 1ns/1fs
module tb_sigma_delta_mod;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0, sel_np1;
  logic [9:0] frac = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sigma_delta_mod dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      int ones, worst;
      logic prev;
      rst_n = 1'b0;
      frac = (t == 0) ? 10'd0 : (t == 1) ? 10'd1 : (t == 2) ? 10'd767 : 10'($urandom_range(767));
      #12 rst_n = 1'b1;
      ones = 0; worst = 0;
      for (int k = 1; k <= 768; k++) begin
        int d;
        @(negedge clk) step = 1'b1;
        @(negedge clk) step = 1'b0;
        if (sel_np1) ones++;
        d = ones * 768 - k * int'(frac);
        if (d < 0) d = -d;
        if (d > worst) worst = d;
        prev = sel_np1;
        @(negedge clk);
        if (sel_np1 != prev) begin failures++; $display("FAIL: output moved without step"); end
      end
      check(ones == int'(frac), $sformatf("frac %0d: %0d carries in 768 steps", frac, ones));
      check(worst <= 768, $sformatf("frac %0d: running error %0d/768", frac, worst));
      #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
