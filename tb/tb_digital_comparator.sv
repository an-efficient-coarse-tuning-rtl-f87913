// tb_digital_comparator - random and equal operands; UP/DOWN must change
// only on COMP_CLK and follow VCO_CNT < / > CH_REF_NUM.
`timescale 1ns/1fs
module tb_digital_comparator;
  logic clk = 1'b0, rst_n = 1'b0, comp_clk = 1'b0, up, down;
  logic [13:0] vco_cnt = '0, ch_ref_num = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  digital_comparator dut (.*);

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
    logic eu, ed;
    #12 rst_n = 1'b1;
    eu = 1'b0; ed = 1'b0;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      ch_ref_num = 14'($urandom_range(16383));
      case (k % 3)
        0: vco_cnt = ch_ref_num;
        1: vco_cnt = ch_ref_num + 14'($urandom_range(3));
        default: vco_cnt = 14'($urandom_range(16383));
      endcase
      comp_clk = (k % 2 == 0);
      @(negedge clk);
      if (comp_clk) begin
        eu = int'(vco_cnt) < int'(ch_ref_num);
        ed = int'(vco_cnt) > int'(ch_ref_num);
      end
      check(up == eu && down == ed,
            $sformatf("cnt %0d ref %0d comp %b: up %b down %b", vco_cnt, ch_ref_num, comp_clk, up, down));
      comp_clk = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
