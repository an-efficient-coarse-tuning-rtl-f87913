// freq_synth_digital - digital core of the fast-switching PHS fractional-N
// frequency synthesizer.
//
// The synthesizer locks an LC-VCO to 38.4 MHz (the 19.2 MHz reference
// doubled) times N + FRAC/768. Its analog loop (reference clock doubler,
// phase-frequency detector, charge pump, loop filter, bandwidth control,
// VCO) is outside this module; this module holds everything digital that
// surrounds it:
//   * coarse_tuning_controller: after reset, weighted-time successive
//     approximation of the VCO tuning word CAPS[9:0] at 1902 MHz, then a
//     per-channel choice of the auxiliary capacitors CAUX_SEL[3:0];
//   * the feedback divider: nn1_divider divides the VCO by N or N+1, under
//     control of the first-order sigma_delta_mod, and gives the divided
//     clock `div_out` for the phase-frequency detector.
// The channel setting is the PHS channel number k (f = 1884.65 MHz +
// k x 300 kHz); it sets N, FRAC and CAUX_SEL. N = f div 38.4 MHz and
// FRAC = remainder in 50 kHz units, both computed here from k.
// Clock domains: ref_clk (coarse tuning sequencer), vco_clk (VCO cycle
// counter, divider, modulator). `channel` is treated as quasi-static in
// both domains: it must be held while a divider period is in progress,
// which the channel-switch procedure of the radio guarantees.
`timescale 1ns/1fs
module freq_synth_digital
  import synth_pkg::*;
#(
  parameter int unsigned T_MIN = T_MIN_DEFAULT,
  parameter int unsigned N     = CNT_W
) (
  input  logic                ref_clk,     // 19.2 MHz REF_CLK
  input  logic                vco_clk,     // VCO output f_OUT
  input  logic                rst_n,       // power-up reset
  input  logic [CH_W-1:0]     channel,     // channel setting
  output logic [NUM_CAPS-1:0] caps,        // VCO coarse tuning word
  output logic [NUM_AUX-1:0]  caux_sel,    // VCO auxiliary capacitors
  output logic                coarse_lock, // main coarse tuning done
  output logic                ct_busy,     // main coarse tuning running
  output logic                div_out,     // divided VCO, to the PFD
  output logic [6:0]          n_int,       // current integer ratio N
  output logic [9:0]          frac,        // current fractional word
  output logic                ct_up,       // last coarse comparison: VCO slow
  output logic                ct_down      // last coarse comparison: VCO fast
);

  logic [FCODE_W-1:0] fcode;
  logic               sel_np1, tc;

  always_comb begin
    fcode = ch_to_fcode(channel);
    n_int = 7'(fcode / FCODE_W'(FRAC_MOD));
    frac  = 10'(fcode % FCODE_W'(FRAC_MOD));
  end

  coarse_tuning_controller #(.T_MIN(T_MIN), .N(N)) u_ctc (
    .ref_clk, .vco_clk, .rst_n, .channel,
    .caps, .caux_sel, .coarse_lock, .ct_busy, .up(ct_up), .down(ct_down)
  );

  sigma_delta_mod #(.MOD(FRAC_MOD), .W(10)) u_sdm (
    .clk(vco_clk), .rst_n, .step(tc), .frac, .sel_np1
  );

  nn1_divider #(.W(7)) u_div (
    .clk(vco_clk), .rst_n, .n_int, .sel_np1, .div_out, .tc
  );

endmodule
