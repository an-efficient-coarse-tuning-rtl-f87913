// tb_ch_ref_num_gen - every PHS channel and the 1902 MHz centre, every
// bit index: CH_REF_NUM must equal round(f x T_i / 19.2 MHz), computed
// here in real arithmetic from f in MHz, with T_i the weighted window
// (60,60,60,30,15,10,6,6,6,6 REF cycles for CAPS[0..9]). One cycle latency.
`timescale 1ns/1fs
module tb_ch_ref_num_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] fcode = '0;
  logic [3:0]  bit_idx = '0;
  logic [13:0] ch_ref_num;
  int checks = 0, failures = 0;
  int T [10] = '{60, 60, 60, 30, 15, 10, 6, 6, 6, 6};

  always #5 clk = ~clk;

  ch_ref_num_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int ch = -1; ch < 117; ch++) begin
      real f;
      f = (ch < 0) ? 1902.0 : 1884.65 + 0.3 * real'(ch);
      fcode = 16'(int'($floor(f * 20.0 + 0.5)));   // 50 kHz units
      for (int b = 0; b < 10; b++) begin
        int e;
        @(negedge clk);
        bit_idx = 4'(b);
        @(negedge clk);
        e = int'($floor(f * real'(T[b]) / 19.2 + 0.5));
        check(int'(ch_ref_num) == e,
              $sformatf("f %0.2f bit %0d: %0d expected %0d", f, b, ch_ref_num, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
