// tb_caps_decision - successive approximation of CAPS[9:0] against an
// ideal "VCO" whose required capacitance is X units (0 .. 266, every
// value tried). DOWN is asserted while the trial capacitance is below X.
// Checks: the final weighted sum V = sum W[i] CAPS[i] satisfies
// X - 1 <= V <= X; `done` pulses after CAPS[0]; a start reloads the trial
// word 10'b10_0000_0000. A second pass injects, for every X, one wrong
// decision at a redundant bit (a capacitor dropped although it was needed,
// by no more than that bit's redundancy) and expects the same accuracy:
// the redundancy of the weights 1,2,3,4,6,10,16,32,64,128 absorbs it.
`timescale 1ns/1fs
module tb_caps_decision;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, des_clk = 1'b0, down = 1'b0;
  logic [3:0] bit_idx = '0;
  logic [9:0] caps;
  logic done;
  int checks = 0, failures = 0, n_corrected = 0;
  int W [10] = '{1, 2, 3, 4, 6, 10, 16, 32, 64, 128};
  int R [10] = '{0, 0, 0, 2, 4, 6, 10, 10, 10, 10};

  always #5 clk = ~clk;

  caps_decision dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int wsum(input logic [9:0] c);
    int s = 0;
    for (int i = 0; i < 10; i++) if (c[i]) s += W[i];
    return s;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int x = 0; x <= 266; x++) begin
        int err_bit;
        bit injected;
        err_bit = 3 + int'($urandom_range(6));
        injected = 1'b0;
        @(negedge clk) start = 1'b1;
        @(negedge clk) start = 1'b0;
        check(caps == 10'b10_0000_0000, "trial word after start");
        for (int b = 9; b >= 0; b--) begin
          int v;
          v = wsum(caps);
          down = (v < x);
          if (pass == 1 && b == err_bit && down && (x - v) <= R[b]) begin
            down = 1'b0;
            injected = 1'b1;
          end
          bit_idx = 4'(b);
          des_clk = 1'b1;
          @(negedge clk);
          des_clk = 1'b0;
          check(done == (b == 0), $sformatf("done at bit %0d", b));
          @(negedge clk);
        end
        if (injected) n_corrected++;
        check(wsum(caps) <= x && wsum(caps) >= x - 1,
              $sformatf("pass %0d X=%0d: CAPS=%b sum %0d", pass, x, caps, wsum(caps)));
      end
    end
    check(n_corrected > 20, $sformatf("only %0d wrong decisions injected", n_corrected));
    $display("wrong decisions injected and absorbed: %0d", n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
