// aux_cap_select - auxiliary coarse tuning: picks CAUX_SEL[3:0] for a
// target frequency.
//
// The main coarse tuning sets CAPS[9:0] once, at 1902 MHz with
// CAUX_SEL = 0011. Each auxiliary capacitor moves the tuned curve down
// (CAUX_SEL[0] and [2] by 6 MHz, [1] and [3] by 12 MHz), so the codes
// 0000, 0001, 0010, 0011, 0111, 1011, 1111 place the curve at
// 1902 MHz +18, +12, +6, 0, -6, -12, -18 MHz. At each channel switch this
// block chooses, without any measurement, the curve whose centre is
// nearest to the target: the step is round((f - 1902 MHz) / 6 MHz),
// clamped to +-3. Rounding to the nearest curve (boundaries at +-3, +-9,
// +-15 MHz) is this design's choice. Purely combinational.
`timescale 1ns/1fs
module aux_cap_select
  import synth_pkg::*;
(
  input  logic [FCODE_W-1:0] fcode,
  output logic [NUM_AUX-1:0] caux_sel
);

  logic signed [FCODE_W:0] d;
  int                      step;   // -3 .. +3

  always_comb begin
    d = $signed({1'b0, fcode}) - $signed((FCODE_W+1)'(F_CENTER_CODE));
    if      (d >=  $signed(17'(5 * AUX_STEP_CODE / 2))) step =  3;
    else if (d >=  $signed(17'(3 * AUX_STEP_CODE / 2))) step =  2;
    else if (d >=  $signed(17'(AUX_STEP_CODE / 2)))     step =  1;
    else if (d >  -$signed(17'(AUX_STEP_CODE / 2)))     step =  0;
    else if (d >  -$signed(17'(3 * AUX_STEP_CODE / 2))) step = -1;
    else if (d >  -$signed(17'(5 * AUX_STEP_CODE / 2))) step = -2;
    else                                                step = -3;
    caux_sel = AUX_CODE[step + 3];
  end

endmodule
