// vco_model - behavioural model of the LC-VCO with its switched capacitor
// banks, for simulation only (not synthesizable).
//
// Output frequency (MHz):
//   f = F_TOP - LSB x sum_i CAPS[i] x W[i] x (1 + mm[i])
//             - AUX x (CAUX[0] + 2 CAUX[1] + CAUX[2] + 2 CAUX[3]) + fine_mhz
// with W = {1,2,3,4,6,10,16,32,64,128} the coarse weights (CAPS[0] first),
// mm[i] a per-capacitor mismatch the testbench may set, AUX = 6 MHz (the
// 6/12/6/12 MHz auxiliary steps) and fine_mhz the varactor contribution of
// the analog loop, set directly by the testbench. The frequency follows
// the inputs at the next half period. freq_mhz(...) gives the same formula
// for any code so testbenches can predict results.
`timescale 1ns/1fs
module vco_model #(
  parameter real F_TOP = 1973.2,
  parameter real LSB   = 0.4,
  parameter real AUX   = 6.0
) (
  input  logic [9:0] caps,
  input  logic [3:0] caux_sel,
  output logic       clk
);

  real mm [10]     = '{default: 0.0};  // relative capacitor mismatch
  real fine_mhz    = 0.0;              // varactor (fine tuning) offset
  real f_top_off   = 0.0;              // process offset added to F_TOP
  real f_now;

  localparam int W [10] = '{1, 2, 3, 4, 6, 10, 16, 32, 64, 128};

  function automatic real freq_mhz(input logic [9:0] c, input logic [3:0] a);
    real f;
    f = F_TOP + f_top_off;
    for (int i = 0; i < 10; i++)
      if (c[i]) f -= LSB * real'(W[i]) * (1.0 + mm[i]);
    f -= AUX * (real'(a[0]) + 2.0 * real'(a[1]) + real'(a[2]) + 2.0 * real'(a[3]));
    return f;
  endfunction

  initial begin
    clk = 1'b0;
    forever begin
      f_now = freq_mhz(caps, caux_sel) + fine_mhz;
      #(500.0 / f_now) clk = ~clk;
    end
  end

endmodule
