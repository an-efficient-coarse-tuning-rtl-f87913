// ch_ref_num_gen - Channel Reference Number Generator.
//
// Turns the target frequency into the VCO count expected in the counting
// window of the bit being decided:
//   CH_REF_NUM = round(f_target x T_i / f_REF) = (fcode x T_i + 192) / 384
// where fcode is the target in 50 kHz units, T_i = win_cycles(bit_idx)
// REF cycles and f_REF = 19.2 MHz (384 x 50 kHz). The result is
// registered on REF_CLK (one cycle latency); it is needed only at
// COMP_CLK, many cycles after bit_idx changes. The formula and the
// rounding are this design's; the block's role (expected count per channel
// setting and window) comes from the original coarse tuning scheme.
`timescale 1ns/1fs
module ch_ref_num_gen
  import synth_pkg::*;
#(
  parameter int unsigned N     = CNT_W,
  parameter int unsigned T_MIN = T_MIN_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FCODE_W-1:0] fcode,
  input  logic [3:0]         bit_idx,
  output logic [N-1:0]       ch_ref_num
);

  logic [7:0]  t_win;
  logic [24:0] prod;
  logic [24:0] quot;

  always_comb begin
    t_win = 8'(win_cycles(bit_idx, T_MIN));
    prod  = 25'(fcode) * 25'(t_win) + 25'(REF_CNT_DIV / 2);
    quot  = prod / 25'(REF_CNT_DIV);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ch_ref_num <= '0;
    else        ch_ref_num <= (quot > 25'({N{1'b1}})) ? '1 : N'(quot);
  end

endmodule
