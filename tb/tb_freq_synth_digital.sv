// tb_freq_synth_digital - end-to-end run of the synthesizer's digital core
// at its default parameters, with a behavioural VCO and an ideal analog
// loop.
//
// 1. Power-up: main coarse tuning at 1902 MHz. COARSE_LOCK must rise
//    302 REF cycles after reset; the VCO with the chosen CAPS and
//    CAUX_SEL = 0011 must be within 1.05 MHz of 1902 MHz. The EN_CNT
//    window lengths seen must be exactly 6 (x4), 10, 15, 30, 60 (x3).
// 2. Channel switching over the PHS band, starting with a jump from
//    1884.65 MHz to 1915.55 MHz: for each channel the testbench
//    plays the analog loop by setting the varactor offset that puts the
//    VCO on the target, and checks that this offset stays within 3.8 MHz
//    (the auxiliary curve choice is the only coarse step), that CAPS did
//    not move, and that over 768 divider periods the VCO made exactly
//    768 x N + FRAC cycles, with N and FRAC worked out here from the
//    channel frequency and 38.4 MHz, so the divided clock is 38.4 MHz.
// Mechanisms counted, each must occur: UP decision, DOWN decision, each
// of the five window lengths, every one of the seven CAUX_SEL codes,
// divide-by-N and divide-by-N+1 periods, a CAPS freeze after lock.
`timescale 1ns/1fs
module tb_freq_synth_digital;
  localparam real REF_HALF = 500.0 / 19.2;

  logic       ref_clk = 1'b0, rst_n = 1'b0;
  logic [6:0] channel = 7'd58;
  logic [9:0] caps;
  logic [3:0] caux_sel;
  logic       coarse_lock, ct_busy, div_out, ct_up, ct_down, vco_clk;
  logic [6:0] n_int;
  logic [9:0] frac;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_np1 = 0, n_n = 0, n_freeze = 0;
  int win_seen [int];
  int aux_seen [int];

  always #(REF_HALF) ref_clk = ~ref_clk;

  freq_synth_digital dut (
    .ref_clk, .vco_clk, .rst_n, .channel, .caps, .caux_sel, .coarse_lock,
    .ct_busy, .div_out, .n_int, .frac, .ct_up, .ct_down
  );

  vco_model u_vco (.caps, .caux_sel, .clk(vco_clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // EN_CNT window lengths and UP/DOWN decisions, seen at the top's ports
  // and at the sequencer outputs
  int en_len = 0;
  logic en_prev = 1'b0;
  always @(posedge ref_clk) begin
    logic en;
    en = dut.u_ctc.en_cnt;
    if (en) en_len++;
    if (!en && en_prev) begin
      win_seen[en_len] = win_seen.exists(en_len) ? win_seen[en_len] + 1 : 1;
      en_len = 0;
    end
    en_prev = en;
    if (dut.u_ctc.des_clk) begin
      if (ct_up) n_up++;
      if (ct_down) n_down++;
    end
  end

  // divider periods: VCO cycles between rising edges of div_out
  int vco_edges = 0, div_edges = 0, per = 0, mark = 0;
  logic div_prev = 1'b0;
  always @(posedge vco_clk) begin
    vco_edges++;
    per++;
    if (div_out && !div_prev) begin
      div_edges++;
      mark = vco_edges;
      if (per == int'(n_int) + 1) n_np1++;
      else if (per == int'(n_int)) n_n++;
      per = 0;
    end
    div_prev = div_out;
  end

  initial begin
    #(30_000_000.0);   // 30 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   cyc;
    real  f0;
    logic [9:0] caps_locked;
    int   chs [11] = '{0, 103, 8, 28, 38, 58, 78, 98, 109, 116, 57};

    u_vco.f_top_off = 11.0;
    for (int i = 0; i < 10; i++) u_vco.mm[i] = (real'($urandom_range(400)) - 200.0) / 10000.0;
    repeat (3) @(posedge ref_clk);
    #1 rst_n = 1'b1;
    cyc = 0;
    do begin
      @(posedge ref_clk);
      cyc++;
      #1;
    end while (!coarse_lock && cyc < 2000);
    check(cyc == 302, $sformatf("COARSE_LOCK after %0d REF cycles, expected 302", cyc));
    check(!ct_busy, "sequencer idle after lock");
    f0 = u_vco.freq_mhz(caps, 4'b0011);
    $display("main coarse tuning: CAPS=%b, curve at %0.3f MHz", caps, f0);
    check(f0 - 1902.0 < 1.05 && 1902.0 - f0 < 1.05, $sformatf("coarse error %0.3f MHz", f0 - 1902.0));
    check(win_seen.num() == 5 && win_seen[6] == 4 && win_seen[10] == 1 && win_seen[15] == 1
          && win_seen[30] == 1 && win_seen[60] == 3, "weighted EN_CNT windows 6x4,10,15,30,60x3");
    caps_locked = caps;

    foreach (chs[k]) begin
      real ft, fc, fine, nfrac_r;
      int  e_n, e_frac, e0, d0;
      ft = 1884.65 + 0.3 * real'(chs[k]);
      channel = 7'(chs[k]);
      repeat (3) @(posedge ref_clk);
      #1;
      aux_seen[int'(caux_sel)] = 1;
      fc   = u_vco.freq_mhz(caps, caux_sel);
      fine = ft - fc;
      check(fine < 3.8 && fine > -3.8,
            $sformatf("channel %0d: varactor must move %0.3f MHz", chs[k], fine));
      if (caps == caps_locked) n_freeze++;
      check(caps == caps_locked, "CAPS frozen after lock");
      u_vco.fine_mhz = fine;
      // expected division ratio from the target frequency
      e_n     = int'($floor(ft / 38.4));
      nfrac_r = (ft - 38.4 * real'(e_n)) / 0.05;
      e_frac  = int'($floor(nfrac_r + 0.5));
      check(int'(n_int) == e_n && int'(frac) == e_frac,
            $sformatf("channel %0d: N=%0d FRAC=%0d expected %0d %0d", chs[k], n_int, frac, e_n, e_frac));
      // let a few divider periods pass, then count over 768 of them
      @(posedge div_out);
      repeat (4) @(posedge div_out);
      d0 = div_edges;
      wait (div_edges == d0 + 1);
      e0 = mark;
      wait (div_edges == d0 + 769);
      check(mark - e0 == 768 * e_n + e_frac,
            $sformatf("channel %0d: %0d VCO cycles in 768 periods, expected %0d",
                      chs[k], mark - e0, 768 * e_n + e_frac));
      $display("channel %0d (%0.2f MHz): CAUX_SEL=%b varactor %0.3f MHz, N=%0d FRAC=%0d",
               chs[k], ft, caux_sel, fine, n_int, frac);
    end

    check(n_up > 0,   "an UP decision occurred");
    check(n_down > 0, "a DOWN decision occurred");
    check(aux_seen.num() == 7, $sformatf("%0d of 7 CAUX_SEL codes used", aux_seen.num()));
    check(n_np1 > 0, "divide-by-N+1 periods occurred");
    check(n_n > 0,   "divide-by-N periods occurred");
    check(n_freeze > 0, "CAPS held through channel switches");
    $display("UP %0d DOWN %0d, CAUX codes %0d, N periods %0d, N+1 periods %0d",
             n_up, n_down, aux_seen.num(), n_n, n_np1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
