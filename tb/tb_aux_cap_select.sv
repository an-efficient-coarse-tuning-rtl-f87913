// tb_aux_cap_select - CAUX_SEL for all 117 PHS channels and for the
// printed curve centres 1902 MHz + {-18,-12,-6,0,6,12,18} MHz. The expected
// code is the one whose curve (0000:+18 ... 0011:0 ... 1111:-18 MHz) is
// nearest the target, found here by searching the seven curves; each
// auxiliary bit is also checked to shift by 6/12/6/12 MHz.
`timescale 1ns/1fs
module tb_aux_cap_select;
  logic [15:0] fcode = '0;
  logic [3:0]  caux_sel;
  int checks = 0, failures = 0;
  logic [3:0] codes [7] = '{4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0111, 4'b1011, 4'b1111};

  aux_cap_select dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real shift(input logic [3:0] a);   // curve offset, MHz
    return 18.0 - 6.0 * real'(a[0]) - 12.0 * real'(a[1]) - 6.0 * real'(a[2]) - 12.0 * real'(a[3]);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 7; k++)
      check(shift(codes[k]) == 18.0 - 6.0 * real'(k), "code table spacing");
    for (int ch = -7; ch < 117; ch++) begin
      real f, best;
      logic [3:0] e;
      f = (ch < 0) ? 1902.0 + 6.0 * real'(ch + 4) : 1884.65 + 0.3 * real'(ch);
      fcode = 16'(int'($floor(f * 20.0 + 0.5)));
      best = 1.0e9;
      e = '0;
      for (int k = 0; k < 7; k++)
        if (rabs(f - 1902.0 - shift(codes[k])) < best) begin
          best = rabs(f - 1902.0 - shift(codes[k]));
          e = codes[k];
        end
      #1;
      check(caux_sel == e, $sformatf("f %0.2f: CAUX_SEL %b expected %b", f, caux_sel, e));
      check(rabs(f - 1902.0 - shift(caux_sel)) <= 3.0, "curve within 3 MHz");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
