// nn1_divider - N/N+1 frequency divider of the synthesizer feedback path.
//
// A down-counter clocked by the VCO output reloads with N-1 or N (divide
// by N or N+1) when it reaches zero, taking the choice from `sel_np1` at
// that moment. `tc` is high for the last VCO cycle of every output period
// and also steps the sigma-delta modulator. `div_out` is high for the
// first floor(ratio/2) VCO cycles after a reload, so it has exactly one
// rising edge per output period, which is the edge the phase detector uses.
// A single counter rather than a prescaler plus pulse/swallow counters is
// this design's choice.
// Ports: clk (VCO output), rst_n, n_int (N), sel_np1, div_out, tc.
`timescale 1ns/1fs
module nn1_divider #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] n_int,
  input  logic         sel_np1,
  output logic         div_out,
  output logic         tc
);

  logic [W:0] cnt;    // VCO cycles left in this period
  logic [W:0] pos;    // VCO cycles since the reload
  logic [W:0] half;
  logic [W:0] ratio;

  assign ratio = {1'b0, n_int} + (W+1)'(sel_np1);

  assign tc = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pos     <= '0;
      half    <= '0;
      div_out <= 1'b0;
    end else if (tc) begin
      cnt     <= ratio - 1'b1;
      pos     <= '0;
      half    <= ratio >> 1;
      div_out <= 1'b1;
    end else begin
      cnt     <= cnt - 1'b1;
      pos     <= pos + 1'b1;
      div_out <= (pos + 1'b1) < half;
    end
  end

endmodule
