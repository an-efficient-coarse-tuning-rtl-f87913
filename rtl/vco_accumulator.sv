// vco_accumulator - digital accumulator that measures the VCO frequency.
//
// Counts rising edges of the VCO clock while EN_CNT is high and clears on
// RST_CNT. EN_CNT and RST_CNT come from the REF_CLK domain and are brought
// into the VCO domain through two-flop synchronisers; this replaces the
// AND gate that masks the VCO clock with EN_CNT in the original block
// diagram by a clock enable, so the count is the number of VCO cycles in
// the EN_CNT window within +-1. The count saturates at its maximum.
// The count is read in the REF_CLK domain only after EN_CNT has been low
// for a full REF cycle, when it no longer changes, so it needs no
// synchroniser of its own (quasi-static crossing).
// Ports: vco_clk, rst_n (asynchronous), en_cnt, rst_cnt (REF domain),
// vco_cnt (VCO_CNT[N-1:0]). Latency: 2 VCO cycles from EN_CNT to counting.
`timescale 1ns/1fs
module vco_accumulator
  import synth_pkg::*;
#(
  parameter int unsigned N = CNT_W
) (
  input  logic         vco_clk,
  input  logic         rst_n,
  input  logic         en_cnt,
  input  logic         rst_cnt,
  output logic [N-1:0] vco_cnt
);

  logic [1:0] en_sync, rst_sync;

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) begin
      en_sync  <= '0;
      rst_sync <= '0;
      vco_cnt  <= '0;
    end else begin
      en_sync  <= {en_sync[0], en_cnt};
      rst_sync <= {rst_sync[0], rst_cnt};
      if (rst_sync[1])
        vco_cnt <= '0;
      else if (en_sync[1] && vco_cnt != '1)
        vco_cnt <= vco_cnt + 1'b1;
    end
  end

endmodule
