// tb_coarse_tuning_controller - checks the main and auxiliary coarse tuning
// against a behavioural VCO.
//
// Twelve power-ups with VCO process offsets of -30 .. +30 MHz (six fixed,
// six random) and,
// from the second on, random capacitor mismatch of up to +-3 %. For each:
// * COARSE_LOCK must rise exactly 259 + 40 + 3 REF cycles after reset
//   (weighted windows, four strobe cycles per bit, three start/lock flops);
// * the VCO frequency with the chosen CAPS and CAUX_SEL = 0011 must be
//   within 1.05 MHz of 1902 MHz (one LSB of 0.4 MHz plus two counts of
//   0.32 MHz at the 60-cycle window);
// * after lock, CAUX_SEL must follow the nearest auxiliary curve for
//   channels across the band, computed here in real arithmetic, and CAPS
//   must not change.
`timescale 1ns/1fs
module tb_coarse_tuning_controller;
  import synth_pkg::*;

  localparam real REF_HALF = 500.0 / 19.2;

  logic       ref_clk = 1'b0, rst_n = 1'b0;
  logic [6:0] channel = '0;
  logic [9:0] caps;
  logic [3:0] caux_sel;
  logic       coarse_lock, ct_busy, up, down, vco_clk;
  int         checks = 0, failures = 0;
  int         n_up = 0, n_down = 0;

  always #(REF_HALF) ref_clk = ~ref_clk;

  coarse_tuning_controller dut (
    .ref_clk, .vco_clk, .rst_n, .channel, .caps, .caux_sel,
    .coarse_lock, .ct_busy, .up, .down
  );

  vco_model u_vco (.caps, .caux_sel, .clk(vco_clk));

  always @(posedge ref_clk) if (dut.des_clk) begin
    if (up) n_up++;
    if (down) n_down++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0] expected_aux(input int ch);
    real f, d;
    int  s;
    logic [3:0] tbl [7] = '{4'b1111, 4'b1011, 4'b0111, 4'b0011, 4'b0010, 4'b0001, 4'b0000};
    f = 1884.65 + 0.3 * real'(ch);
    d = (f - 1902.0) / 6.0;
    s = (d >= 0.0) ? int'($floor(d + 0.5)) : -int'($floor(-d + 0.5));
    if (s > 3) s = 3;
    if (s < -3) s = -3;
    return tbl[s + 3];
  endfunction

  initial begin
    #(REF_HALF * 2 * 80000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real offs [12] = '{0.0, -30.0, -12.0, 7.3, 18.0, 30.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    int  chs  [9] = '{0, 10, 20, 39, 58, 77, 97, 110, 116};
    for (int t = 6; t < 12; t++) offs[t] = real'($urandom_range(6000)) / 100.0 - 30.0;
    for (int t = 0; t < 12; t++) begin
      int   cyc;
      real  f, err;
      logic [9:0] caps_locked;
      rst_n = 1'b0;
      channel = 7'd58;
      u_vco.f_top_off = offs[t];
      for (int i = 0; i < 10; i++)
        u_vco.mm[i] = (t == 0) ? 0.0 : (real'($urandom_range(600)) - 300.0) / 10000.0;
      repeat (3) @(posedge ref_clk);
      #1 rst_n = 1'b1;
      cyc = 0;
      do begin
        @(posedge ref_clk);
        cyc++;
        #1;
      end while (!coarse_lock && cyc < 2000);
      check(cyc == 259 + 40 + 3, $sformatf("trial %0d lock after %0d REF cycles", t, cyc));
      f   = u_vco.freq_mhz(caps, 4'b0011);
      err = f - 1902.0;
      $display("trial %0d offset %0.1f MHz: CAPS=%b f=%0.3f MHz err=%0.3f MHz", t, offs[t], caps, f, err);
      check(err < 1.05 && err > -1.05, $sformatf("trial %0d coarse error %0.3f MHz", t, err));
      caps_locked = caps;
      foreach (chs[k]) begin
        real ft, fv;
        channel = 7'(chs[k]);
        repeat (3) @(posedge ref_clk);
        #1;
        check(caux_sel == expected_aux(chs[k]),
              $sformatf("channel %0d CAUX_SEL=%b expected %b", chs[k], caux_sel, expected_aux(chs[k])));
        check(caps == caps_locked, "CAPS changed after lock");
        ft = 1884.65 + 0.3 * real'(chs[k]);
        fv = u_vco.freq_mhz(caps, caux_sel);
        check(fv - ft < 3.8 && ft - fv < 3.8,
              $sformatf("channel %0d curve at %0.3f MHz, target %0.3f", chs[k], fv, ft));
      end
    end
    check(n_up > 0 && n_down > 0, "both UP and DOWN decisions seen");
    $display("UP decisions %0d, DOWN decisions %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

