// tb_en_counter_gen - checks the weighted timing of the coarse tuning
// sequencer at T_MIN = 60.
// Expected EN_CNT windows for CAPS[9] .. CAPS[0]: 6, 6, 6, 6, 10, 15, 30,
// 60, 60, 60 REF cycles (T_MIN divided by the redundancy 10,10,10,10,6,4,2
// and T_MIN for zero redundancy), 259 in all. After each window: one idle
// cycle, then COMP_CLK, DES_CLK, RST_CNT one cycle each, in that order.
// The whole run from start to done is 299 + 1 cycles. Run twice.
`timescale 1ns/1fs
module tb_en_counter_gen;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic en_cnt, comp_clk, des_clk, rst_cnt, busy, done;
  logic [3:0] bit_idx;
  int checks = 0, failures = 0;
  int exp_win [10] = '{60, 60, 60, 30, 15, 10, 6, 6, 6, 6};  // index = bit

  always #10 clk = ~clk;

  en_counter_gen dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int total, sum;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      total = 1;
      sum = 0;
      for (int b = 9; b >= 0; b--) begin
        int w;
        w = 0;
        check(bit_idx == 4'(b), $sformatf("bit_idx %0d expected %0d", bit_idx, b));
        while (en_cnt) begin
          check(!comp_clk && !des_clk && !rst_cnt, "strobe during EN_CNT");
          w++; total++;
          @(negedge clk);
        end
        check(w == exp_win[b], $sformatf("bit %0d window %0d expected %0d", b, w, exp_win[b]));
        sum += w;
        check({comp_clk, des_clk, rst_cnt} == 3'b000, "idle cycle after window");
        @(negedge clk); total++;
        check({comp_clk, des_clk, rst_cnt} == 3'b100, "COMP_CLK");
        @(negedge clk); total++;
        check({comp_clk, des_clk, rst_cnt} == 3'b010, "DES_CLK");
        @(negedge clk); total++;
        check({comp_clk, des_clk, rst_cnt} == 3'b001 && bit_idx == 4'(b), "RST_CNT");
        @(negedge clk); total++;
      end
      check(done && !busy, "done after the last bit");
      check(sum == 259, $sformatf("windows sum %0d, expected 259", sum));
      check(total == 300, $sformatf("start to done %0d cycles, expected 300", total));
      @(negedge clk);
      check(!done && !en_cnt, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
