// tb_nn1_divider - drives random N in 40..60 and a random N/N+1 choice per
// period; measures each output period in input cycles from rising edge to
// rising edge of div_out and checks it equals N + choice, that `tc` is
// high exactly once per period, and that div_out is high for floor(ratio/2)
// cycles.
`timescale 1ns/1fs
module tb_nn1_divider;
  logic clk = 1'b0, rst_n = 1'b0, sel_np1 = 1'b0, div_out, tc;
  logic [6:0] n_int = 7'd49;
  int checks = 0, failures = 0, n_np1 = 0;

  always #0.25 clk = ~clk;

  nn1_divider dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the choice is sampled when tc is high: change it just after each tc
  initial begin
    #3 rst_n = 1'b1;
    // skip the first partial period
    do begin
      @(posedge clk);
      #0.1;
    end while (!tc);
    for (int p = 0; p < 400; p++) begin
      int ratio, len, hi, ntc;
      n_int   = 7'(40 + $urandom_range(20));
      sel_np1 = 1'($urandom_range(1));
      ratio   = int'(n_int) + int'(sel_np1);
      if (sel_np1) n_np1++;
      @(posedge clk);  // reload edge
      #0.1;
      len = 1; hi = int'(div_out); ntc = int'(tc);
      while (!tc) begin
        @(posedge clk);
        #0.1;
        len++;
        hi += int'(div_out);
        ntc += int'(tc);
      end
      check(len == ratio, $sformatf("period %0d cycles, expected %0d", len, ratio));
      check(hi == ratio / 2, $sformatf("period %0d: high for %0d cycles, expected %0d (ratio %0d)", p, hi, ratio / 2, ratio));
      check(ntc == 1, "one tc per period");
    end
    check(n_np1 > 100, "N+1 periods exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
