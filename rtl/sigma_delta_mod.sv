// sigma_delta_mod - first-order sigma-delta modulator for the fractional-N
// divider.
//
// An accumulator modulo MOD adds the fractional word FRAC once per divider
// cycle (`step`, one VCO-clock strobe per divider output period). Its carry
// selects divide-by-N+1 for the next divider cycle, so over MOD divider
// cycles exactly FRAC of them divide by N+1 and the average ratio is
// N + FRAC/MOD. With MOD = 768 and a 38.4 MHz comparison frequency one
// FRAC step is 50 kHz, fine enough for the 300 kHz PHS raster offset from
// 1884.65 MHz. The single-bit output matches an N/N+1 prescaler; the order
// of the modulator and MOD are this design's choices.
// Ports: clk (VCO domain), rst_n, step, frac, sel_np1 (registered).
`timescale 1ns/1fs
module sigma_delta_mod
  import synth_pkg::*;
#(
  parameter int unsigned MOD = FRAC_MOD,
  parameter int unsigned W   = $clog2(MOD)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [W-1:0] frac,
  output logic         sel_np1
);

  logic [W-1:0] acc;
  logic [W:0]   sum;

  assign sum = {1'b0, acc} + {1'b0, frac};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      sel_np1 <= 1'b0;
    end else if (step) begin
      if (sum >= (W+1)'(MOD)) begin
        acc     <= W'(sum - (W+1)'(MOD));
        sel_np1 <= 1'b1;
      end else begin
        acc     <= W'(sum);
        sel_np1 <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) acc < W'(MOD));

endmodule
