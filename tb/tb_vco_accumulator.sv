// tb_vco_accumulator - counts a 1 GHz clock in enable windows of known
// length and checks the count within +-1, the clear on RST_CNT, that
// nothing is counted with EN_CNT low, and saturation with N = 8.
`timescale 1ns/1fs
module tb_vco_accumulator;
  logic vco_clk = 1'b0, rst_n = 1'b0, en_cnt = 1'b0, rst_cnt = 1'b0;
  logic [13:0] cnt;
  logic [7:0]  cnt8;
  int checks = 0, failures = 0;

  always #0.5 vco_clk = ~vco_clk;

  vco_accumulator dut (.vco_clk, .rst_n, .en_cnt, .rst_cnt, .vco_cnt(cnt));
  vco_accumulator #(.N(8)) dut8 (.vco_clk, .rst_n, .en_cnt, .rst_cnt, .vco_cnt(cnt8));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10.3 rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      int len;
      len = (k == 19) ? 400 : 10 + int'($urandom_range(180));
      #(7.3);
      en_cnt = 1'b1;
      #(real'(len));
      en_cnt = 1'b0;
      #20;
      check(int'(cnt) >= len - 1 && int'(cnt) <= len + 1,
            $sformatf("window %0d ns: count %0d", len, cnt));
      if (k == 19) check(cnt8 == 8'hFF, $sformatf("8-bit counter saturates: %0d", cnt8));
      else         check(int'(cnt8) == int'(cnt), "8-bit counter equals 14-bit one");
      #50;
      check(int'(cnt) >= len - 1 && int'(cnt) <= len + 1, "count holds with EN_CNT low");
      rst_cnt = 1'b1;
      #10;
      rst_cnt = 1'b0;
      #5;
      check(cnt == '0, "cleared by RST_CNT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
