// coarse_tuning_controller - main and auxiliary coarse tuning of the LC-VCO.
//
// Main coarse tuning runs once after reset (power-up). The auxiliary bank
// is held at CAUX_SEL = 0011 and the 10-bit tuning word CAPS[9:0] is found
// for the 1902 MHz band centre by successive approximation: for each bit,
// from CAPS[9] down to CAPS[0], the VCO cycles are counted during a window
// of REF_CLK cycles (vco_accumulator), compared with the count expected at
// 1902 MHz (ch_ref_num_gen, digital_comparator) and the bit is kept or
// dropped (caps_decision). en_counter_gen sequences EN_CNT, COMP_CLK,
// DES_CLK and RST_CNT with windows weighted by the redundancy of each bit:
// short windows for the redundant upper bits, the full T_MIN for
// CAPS[2:0]. At T_MIN = 60 the windows sum to 259 REF cycles and the whole
// main tuning takes 302 REF cycles from reset to COARSE_LOCK
// (15.7 us at 19.2 MHz), against
// 10 x 60 windows for equal windows.
// When it ends, COARSE_LOCK rises and the tuning word is frozen until the
// next reset; this register stands for the switches between the
// controller and the VCO, which isolate the VCO from the controller once
// tuning is done. From then on CAUX_SEL follows the channel setting
// (aux_cap_select, registered on REF_CLK), which is the only coarse step at
// a channel switch.
// Clocks: ref_clk (19.2 MHz) for everything except the counter, which runs
// on vco_clk. `channel` is a quasi-static input (PHS channel number k,
// f = 1884.65 MHz + k x 300 kHz). The exact cycle counts, the channel
// numbering and the measurement constants are this design's choices.
`timescale 1ns/1fs
module coarse_tuning_controller
  import synth_pkg::*;
#(
  parameter int unsigned T_MIN = T_MIN_DEFAULT,
  parameter int unsigned N     = CNT_W
) (
  input  logic                ref_clk,
  input  logic                vco_clk,
  input  logic                rst_n,
  input  logic [CH_W-1:0]     channel,
  output logic [NUM_CAPS-1:0] caps,        // to the VCO tuning capacitors
  output logic [NUM_AUX-1:0]  caux_sel,    // to the VCO auxiliary capacitors
  output logic                coarse_lock, // main coarse tuning finished
  output logic                ct_busy,
  output logic                up,
  output logic                down
);

  logic              start_q, start_seq, started;
  logic              en_cnt, comp_clk, des_clk, rst_cnt, seq_done;
  logic [3:0]        bit_idx;
  logic [N-1:0]      vco_cnt, ch_ref_num;
  logic [NUM_CAPS-1:0] caps_sar;
  logic              sar_done;
  logic [NUM_AUX-1:0] caux_chan;

  // One start pulse after reset. The sequencer starts one cycle after the
  // decision block, so that the first trial word (CAPS[9] on) has reached
  // the VCO through the output register before the first window opens.
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      started   <= 1'b0;
      start_q   <= 1'b0;
      start_seq <= 1'b0;
    end else begin
      start_q   <= !started;
      start_seq <= start_q;
      started   <= 1'b1;
    end
  end

  en_counter_gen #(.T_MIN(T_MIN)) u_en_gen (
    .clk(ref_clk), .rst_n, .start(start_seq),
    .en_cnt, .comp_clk, .des_clk, .rst_cnt, .bit_idx,
    .busy(ct_busy), .done(seq_done)
  );

  vco_accumulator #(.N(N)) u_acc (
    .vco_clk, .rst_n, .en_cnt, .rst_cnt, .vco_cnt
  );

  ch_ref_num_gen #(.N(N), .T_MIN(T_MIN)) u_ref (
    .clk(ref_clk), .rst_n, .fcode(FCODE_W'(F_CENTER_CODE)), .bit_idx, .ch_ref_num
  );

  digital_comparator #(.N(N)) u_cmp (
    .clk(ref_clk), .rst_n, .comp_clk, .vco_cnt, .ch_ref_num, .up, .down
  );

  caps_decision u_dec (
    .clk(ref_clk), .rst_n, .start(start_q), .des_clk, .bit_idx, .down,
    .caps(caps_sar), .done(sar_done)
  );

  aux_cap_select u_aux (
    .fcode(ch_to_fcode(channel)), .caux_sel(caux_chan)
  );

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      caps        <= '0;
      caux_sel    <= AUX_CENTER;
      coarse_lock <= 1'b0;
    end else begin
      if (!coarse_lock) caps <= caps_sar;
      if (sar_done)     coarse_lock <= 1'b1;
      caux_sel <= coarse_lock ? caux_chan : AUX_CENTER;
    end
  end

  // the sequencer ends one cycle (RST_CNT) after the last decision
  assert property (@(posedge ref_clk) disable iff (!rst_n) sar_done |=> seq_done);

endmodule
