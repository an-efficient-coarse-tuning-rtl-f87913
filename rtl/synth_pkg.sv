// synth_pkg - constants and helper functions shared by the PHS synthesizer
// digital blocks.
//
// Frequencies are carried as integer "frequency codes" in units of 50 kHz.
// 50 kHz divides the 300 kHz PHS channel raster, the 1884.65 MHz first
// channel, the 1902 MHz band centre, the 19.2 MHz reference and the 38.4 MHz
// doubled reference, so every conversion below is exact integer arithmetic:
//   channel k            -> f = 1884.65 MHz + k * 300 kHz
//   divider ratio        -> f / 38.4 MHz  = code / 768
//   VCO count in T REF cycles of 19.2 MHz -> code * T / 384
//
// The capacitor weights W[i] and redundancies R[i] are the coarse tuning
// array of the design (CAPS[0] smallest). The counting window for CAPS[i]
// is T_MIN / R[i] (T_MIN where R[i] is zero), which gives the weighted
// bit-comparison times 4 x T/10, T/6, T/4, T/2 and 3 x T for CAPS[9..0].
// The unit of 50 kHz, the channel numbering and T_MIN = 60 REF cycles are
// this design's choices.
`timescale 1ns/1fs
package synth_pkg;

  localparam int unsigned NUM_CAPS      = 10;   // CAPS[9:0]
  localparam int unsigned NUM_AUX       = 4;    // CAUX_SEL[3:0]
  localparam int unsigned CH_W          = 7;    // channel number width
  localparam int unsigned FCODE_W       = 16;   // frequency code width (50 kHz units)
  localparam int unsigned CNT_W         = 14;   // VCO counter / CH_REF_NUM width (N)

  localparam int unsigned F_UNIT_HZ     = 50_000;
  localparam int unsigned F_CH0_CODE    = 37_693; // 1884.65 MHz
  localparam int unsigned CH_STEP_CODE  = 6;      // 300 kHz channel spacing
  localparam int unsigned F_CENTER_CODE = 38_040; // 1902 MHz band centre
  localparam int unsigned FRAC_MOD      = 768;    // 38.4 MHz / 50 kHz
  localparam int unsigned REF_CNT_DIV   = 384;    // 19.2 MHz / 50 kHz
  localparam int unsigned AUX_STEP_CODE = 120;    // 6 MHz per auxiliary step

  localparam int unsigned T_MIN_DEFAULT = 60;     // REF cycles for CAPS[2:0]

  // Relative capacitor weights and redundancy amounts, index = CAPS bit.
  localparam int unsigned CAP_W [NUM_CAPS] = '{1, 2, 3, 4, 6, 10, 16, 32, 64, 128};
  localparam int unsigned CAP_R [NUM_CAPS] = '{0, 0, 0, 2, 4, 6, 10, 10, 10, 10};

  // CAUX_SEL code for an auxiliary step s = -3..+3 (curve shift of s x 6 MHz
  // up from the 1902 MHz curve), indexed by s + 3.
  localparam logic [NUM_AUX-1:0] AUX_CODE [7] =
    '{4'b1111, 4'b1011, 4'b0111, 4'b0011, 4'b0010, 4'b0001, 4'b0000};
  localparam logic [NUM_AUX-1:0] AUX_CENTER = 4'b0011;

  // Counting window (REF cycles) for the decision of CAPS[b].
  function automatic int unsigned win_cycles(input logic [3:0] b, input int unsigned t_min);
    int unsigned r;
    r = CAP_R[b];
    return (r == 0) ? t_min : t_min / r;
  endfunction

  // Channel number to frequency code.
  function automatic logic [FCODE_W-1:0] ch_to_fcode(input logic [CH_W-1:0] ch);
    return FCODE_W'(F_CH0_CODE + CH_STEP_CODE * int'(ch));
  endfunction

endpackage
