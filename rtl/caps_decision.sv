// caps_decision - CAPS decision block: successive approximation of the
// coarse tuning word CAPS[9:0].
//
// CAPS[i] = 1 switches capacitor i into the LC tank and lowers the VCO
// frequency. On `start` the word becomes 10'b10_0000_0000 (CAPS[9] on
// trial). On each DES_CLK strobe for bit i the trial bit is kept when the
// comparator did not ask for a higher frequency (UP low: DOWN, or an exact
// match) and dropped when UP is high; the next lower bit is then put on
// trial. Because the capacitor weights are redundant (each weight is at
// most the sum of the lower ones), a wrong early decision made with a
// short counting window is corrected by the lower bits as long as its
// error is within that bit's redundancy.
// Ports: clk (REF_CLK), rst_n, start, des_clk, bit_idx, up, caps, done.
// `done` pulses in the cycle after the decision of CAPS[0].
`timescale 1ns/1fs
module caps_decision
  import synth_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                des_clk,
  input  logic [3:0]          bit_idx,
  input  logic                down,
  output logic [NUM_CAPS-1:0] caps,
  output logic                done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      caps <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        caps <= NUM_CAPS'(1) << (NUM_CAPS - 1);
      end else if (des_clk) begin
        caps[bit_idx] <= down;
        if (bit_idx != 4'd0) caps[bit_idx - 4'd1] <= 1'b1;
        else                 done <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) des_clk |-> bit_idx < 4'(NUM_CAPS));

endmodule
