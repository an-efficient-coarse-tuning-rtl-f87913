// digital_comparator - compares the measured VCO count with the channel
// reference number.
//
// On a COMP_CLK strobe (REF_CLK domain) it registers
//   DOWN = VCO_CNT > CH_REF_NUM  (VCO too fast: lower its frequency)
//   UP   = VCO_CNT < CH_REF_NUM  (VCO too slow: raise its frequency)
// and holds both until the next strobe. On equality neither is asserted;
// that case is this design's choice. Latency: one REF cycle.
`timescale 1ns/1fs
module digital_comparator
  import synth_pkg::*;
#(
  parameter int unsigned N = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         comp_clk,
  input  logic [N-1:0] vco_cnt,
  input  logic [N-1:0] ch_ref_num,
  output logic         up,
  output logic         down
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up   <= 1'b0;
      down <= 1'b0;
    end else if (comp_clk) begin
      up   <= (vco_cnt < ch_ref_num);
      down <= (vco_cnt > ch_ref_num);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up && down));

endmodule
