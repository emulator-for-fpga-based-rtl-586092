// tb_radar_emulator_top: end-to-end run of the emulator at reduced sizes
// (16-sample base pulse, 8 clocks per serial bit, short PRIs). The test
// programs the emulator over the serial line and works the board switches,
// and it watches the outputs:
//  - every PRT cover pulse is as long as the pulse width in force, and a new
//    pulse width takes effect at a CPI strobe;
//  - PRI lengths follow the stagger table plus a jitter within its mask;
//  - CPI strobes come every cpi_pulses PRIs;
//  - the BITE pulse starts at its range (or at the end of the transmit pulse)
//    and is cut by the next PRT;
//  - the doppler phase advances by its step each PRI;
//  - the sweep direction of the IF chirp (zero-crossing rate rising or
//    falling through the pulse) matches up/down mode;
//  - radar_signal carries a strong chirp and bite_out an echo of the expected
//    attenuation, with noise only when enabled;
//  - switch changes retune the IF;
//  - a bad serial frame is flagged;
//  - the second radar keeps its own PRI (its default, then one written to its
//    register bank) while the first is reprogrammed, and if_mix is the sum of
//    both radars' IF, equal to if_out whenever the second radar is quiet.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_radar_emulator_top;
  import radar_pkg::*;
  localparam int CPB = 8, BASE = 16;
  logic clk = 0, ext_rst_n = 1, rxd = 1;
  logic [6:0] sw = '0;
  sample_t if_out, if_raw, radar_signal, bite_out;
  logic prt, bite, cpi, ferr, cfg_wr;
  logic [1:0] pri_idx;
  time_t period;
  pw_sel_t pw_sel;
  logic signed [16:0] if_mix;
  logic [1:0] prt_all, bite_all;
  int checks = 0, failures = 0;

  radar_emulator_top #(.CLKS_PER_BIT(CPB), .DEBOUNCE(4), .BASE_LEN(BASE),
                       .DEF_PRI(400), .DEF_RANGE(150)) dut (
    .clk, .ext_rst_n, .uart_rxd(rxd), .sw, .if_out, .if_raw, .radar_signal, .bite_out,
    .prt, .bite, .cpi, .uart_frame_err(ferr), .cfg_wr, .pri_idx, .period, .pw_sel,
    .if_mix, .prt_all, .bite_all);

  always #5 clk = ~clk;
  initial #1 ext_rst_n = 0;   // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- what the test has asked for ----
  int pri_tab [4];
  int stag_last, jit_mask, cpi_n, range_set, want_pw, want_down, att_now, noise_now;
  phase_t dop;
  int pw_cpi, down_cpi;        // values in force since the last CPI

  // ---- mechanism counters ----
  int n_wr, n_ferr, n_cpi, n_pw_switch, n_stagger, n_jitter, n_bite, n_clamp, n_cut;
  int n_doppler, n_up, n_down, n_retune, n_att, n_noise;

  // ---- monitors ----
  int t_since, pri_cnt, prt_hi, bite_on, bite_hi, pulses_in_cpi, last_pw;
  phase_t last_ph;
  phase_t last_ftw;
  logic prt_q, bite_q;
  logic [3:0] prt_d;           // prt delayed to line up with if_raw
  int zc1, zc2, zn, prev_sign;
  real bite_e, quiet_e;
  int bite_n, quiet_n;

  always @(posedge clk) if (dut.rst_n) begin
    #2;
    if (cfg_wr) n_wr++;
    if (ferr) n_ferr++;
    if (dut.ftw != last_ftw) begin n_retune++; last_ftw = dut.ftw; end
    // PRT start
    if (prt && !prt_q) begin
      if (pri_cnt > 0) begin
        int d;
        d = t_since - pri_exp;
        if (!skip_prev)
          chk(d >= 0 && d <= jit_mask, $sformatf("PRI %0d vs table %0d", t_since, pri_exp));
        if (d != 0) n_jitter++;
        if (pri_exp != pri_tab[0] && stag_last != 0) n_stagger++;
        // BITE of the previous PRI
        if (bite_on >= 0 && !skip_prev) begin
          int exp_on;
          exp_on = (range_prev < (BASE << pw_prev)) ? (BASE << pw_prev) : range_prev;
          chk(bite_on == exp_on, $sformatf("BITE at %0d, expected %0d", bite_on, exp_on));
          if (exp_on != range_prev) n_clamp++;
          if (exp_on + (BASE << pw_prev) > t_since) begin
            n_cut++;
            chk(bite_hi == t_since - exp_on, "BITE cut by the next PRT");
          end else chk(bite_hi == (BASE << pw_prev), $sformatf("BITE width %0d", bite_hi));
          n_bite++;
        end
        if (dut.g_radar[0].bite_phase != last_ph && !skip_prev) begin
          chk(dut.g_radar[0].bite_phase - last_ph == dop_prev, "doppler step");
          n_doppler++;
        end
      end
      last_ph = dut.g_radar[0].bite_phase;
      if (cpi) begin
        n_cpi++;
        if (pri_cnt > 0 && !skip_prev) chk(pulses_in_cpi == cpi_prev, $sformatf("CPI of %0d PRIs", pulses_in_cpi));
        pw_cpi = want_pw; down_cpi = want_down; pulses_in_cpi = 0; cpi_prev = cpi_n;
        unsure = writing;
      end
      pulses_in_cpi++;
      pri_cnt++;
      t_since = 0; bite_on = -1; bite_hi = 0;
      skip_prev = writing || unsure;
      range_prev = range_set; pw_prev = pw_cpi; dop_prev = dop;
    end
    if (t_since == 1) pri_exp = pri_tab[pri_idx];   // index of this PRI, registered at its start
    if (pw_sel != pw_sel_t'(last_pw)) begin
      chk(cpi, "pulse width changes only at a CPI");
      n_pw_switch++;
      last_pw = int'(pw_sel);
    end
    if (prt) prt_hi++;
    if (!prt && prt_q) begin
      if (!skip_prev) chk(prt_hi == (BASE << pw_cpi) && pw_sel == pw_sel_t'(pw_cpi), $sformatf("PRT width %0d", prt_hi));
      prt_hi = 0;
    end
    if (bite) begin
      if (bite_on < 0) bite_on = t_since;
      bite_hi++;
    end
    t_since++;
    prt_q = prt; bite_q = bite;
  end

  int pri_exp, range_prev, pw_prev, cpi_prev;
  bit writing;                 // settings are being changed over the serial line
  bit unsure;                  // the CPI began while settings were changing
  bit skip_prev;               // the current PRI is not checked
  phase_t dop_prev;

  // sweep direction from the zero-crossing rate of if_raw over the pulse
  always @(posedge clk) if (dut.rst_n) begin
    #3;
    if (prt_d[3]) begin
      int sg;
      sg = (if_raw >= 0) ? 1 : -1;
      if (zn > 0 && sg != prev_sign) begin
        if (zn < (BASE << pw_cpi) / 2) zc1++; else zc2++;
      end
      prev_sign = sg; zn++;
    end else if (zn > 0) begin
      if ((BASE << pw_cpi) >= 64 && !skip_prev) begin
        if (down_cpi != 0) begin chk(zc2 < zc1, $sformatf("down-chirp %0d %0d", zc1, zc2)); n_down++; end
        else          begin chk(zc2 > zc1, $sformatf("up-chirp %0d %0d", zc1, zc2)); n_up++; end
      end
      zn = 0; zc1 = 0; zc2 = 0;
    end
    prt_d = {prt_d[2:0], prt};
  end

  // output levels
  always @(posedge clk) if (dut.rst_n) begin
    #4;
    if (src_out_q == SRC_BITE) begin bite_e += real'(bite_out) * real'(bite_out); bite_n++; end
    else if (src_out_q == SRC_NONE) begin quiet_e += real'(bite_out) * real'(bite_out); quiet_n++; end
    if (src_out_q != SRC_PRT) chk(radar_signal == 0, "radar_signal outside PRT");
    src_out_q = dut.g_radar[0].src_out;
  end
  src_e src_out_q = SRC_NONE;

  // second radar: PRI and PRT width, and the summed output
  int r1_pri, r1_t, r1_hi, r1_idle, n_r1_pri, n_mix_quiet, n_mix_r1;
  bit r1_writing, r1_skip;
  logic r1_q;
  sample_t if_out_q, if1_q;
  always @(posedge clk) if (dut.rst_n) begin
    #2;
    if (prt_all[1] && !r1_q) begin
      if (r1_t >= 0 && !r1_skip) begin
        chk(r1_t + 1 == r1_pri, $sformatf("second radar PRI %0d, expected %0d", r1_t + 1, r1_pri));
        n_r1_pri++;
      end
      r1_t = 0; r1_skip = r1_writing;
    end else if (r1_t >= 0) r1_t++;
    if (prt_all[1]) r1_hi++;
    if (!prt_all[1] && r1_q) begin chk(r1_hi == BASE, $sformatf("second radar PRT width %0d", r1_hi)); r1_hi = 0; end
    r1_q = prt_all[1];
    chk(if_mix == 17'(if_out_q) + 17'(if1_q), "if_mix is the sum of both radars");
    if (r1_idle > 40) begin
      chk(if_mix == 17'(if_out_q), "if_mix equals if_out while the second radar is quiet");
      n_mix_quiet++;
    end else if (if1_q != 0 && if_mix != 17'(if_out_q)) n_mix_r1++;
    r1_idle = (prt_all[1] || bite_all[1]) ? 0 : r1_idle + 1;
    if_out_q = if_out; if1_q = dut.g_radar[1].if_out_k;
  end

  // ---- stimulus ----
  task automatic uart_byte(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    bit w;
    w = writing;
    writing = 1;
    uart_byte(8'hA5, 1); uart_byte(a, 1);
    uart_byte(d[31:24], 1); uart_byte(d[23:16], 1); uart_byte(d[15:8], 1); uart_byte(d[7:0], 1);
    writing = w;
  endtask
  task automatic ctrl();
    wr(8'd4, 32'(want_pw) | (32'(stag_last) << 2) | (32'(want_down) << 4) | (32'd1 << 5) | (32'(cpi_n) << 8));
  endtask
  task automatic wait_cpis(input int n);
    int c0;
    c0 = n_cpi;
    while (n_cpi < c0 + n) @(posedge clk);
  endtask
  // BITE echo energy against the chirp, and against the quiet level
  task automatic measure(output real e_bite, output real e_quiet);
    bite_e = 0; quiet_e = 0; bite_n = 0; quiet_n = 0;
    wait_cpis(2);
    e_bite = bite_e / (bite_n + 1); e_quiet = quiet_e / (quiet_n + 1);
  endtask

  initial begin
    real eb0, eq0, eb1, eq1;
    foreach (pri_tab[i]) pri_tab[i] = 400;
    stag_last = 0; jit_mask = 0; cpi_n = 16; range_set = 150; want_pw = 0; want_down = 0;
    dop = '0; pw_cpi = 0; down_cpi = 0; cpi_prev = 16; last_ftw = '0;
    t_since = 0; pri_cnt = 0; prt_hi = 0; bite_on = -1; bite_hi = 0; pulses_in_cpi = 0;
    last_pw = 0; prt_q = 0; bite_q = 0; writing = 0; unsure = 1; skip_prev = 1; prt_d = '0; zn = 0; zc1 = 0; zc2 = 0; prev_sign = 1;
    {n_wr, n_ferr, n_cpi, n_pw_switch, n_stagger, n_jitter, n_bite, n_clamp, n_cut} = '0;
    {n_doppler, n_up, n_down, n_retune, n_att, n_noise} = '0;
    bite_e = 0; quiet_e = 0; bite_n = 0; quiet_n = 0;
    r1_pri = 450; r1_t = -1; r1_hi = 0; r1_idle = 0; r1_writing = 0; r1_skip = 1; r1_q = 0;
    {n_r1_pri, n_mix_quiet, n_mix_r1} = '0; if_out_q = '0; if1_q = '0;
    repeat (3) @(posedge clk); #1;
    ext_rst_n = 1;
    repeat (2000) @(posedge clk);
    chk(n_r1_pri > 2, "second radar runs at its default PRI");
    // second radar: a new PRI through its own register bank (address 8)
    r1_writing = 1; wr(8'd8, 32'd330); r1_pri = 330;
    repeat (500) @(posedge clk); r1_writing = 0;
    // program: staggered and jittered PRI, longest pulse, 4-PRI CPIs, doppler
    writing = 1;
    pri_tab = '{300, 350, 420, 380};
    for (int i = 0; i < 4; i++) wr(8'(i), 32'(pri_tab[i]));
    stag_last = 3; jit_mask = 7; cpi_n = 4; want_pw = 3;
    wr(8'd5, 32'(jit_mask));
    dop = 32'h2000_0000; wr(8'd7, dop);
    ctrl();
    writing = 0;
    wait_cpis(3);
    // down-chirp
    want_down = 1; ctrl();
    wait_cpis(3);
    // BITE range inside the transmit pulse, then one that runs into the next PRT
    want_down = 0; ctrl();
    writing = 1; range_set = 20; wr(8'd6, 32'(range_set)); writing = 0;
    wait_cpis(2);
    writing = 1; range_set = 250; wr(8'd6, 32'(range_set)); writing = 0;
    wait_cpis(2);
    writing = 1; range_set = 140; wr(8'd6, 32'(range_set)); writing = 0;
    wait_cpis(1);
    measure(eb0, eq0);
    chk(eq0 == 0.0, "no noise when the noise level is 0");
    chk(eb0 > 1.0e7, $sformatf("BITE echo level %f", eb0));
    // switches: other IF, attenuation by 2^3, full noise
    sw = 7'b11_011_01;
    att_now = 3; noise_now = 3;
    repeat (20) @(posedge clk);
    measure(eb1, eq1);
    chk(eb1 < eb0 / 20.0 && eb1 > eb0 / 200.0, $sformatf("attenuated echo %f vs %f", eb1, eb0));
    if (eb1 < eb0 / 20.0) n_att++;
    chk(eq1 > 10000.0 && eq1 < 40000.0, $sformatf("noise power %f", eq1));
    if (eq1 > 10000.0) n_noise++;
    // a bad serial frame
    uart_byte(8'h5A, 0);
    repeat (50) @(posedge clk);

    $display("writes %0d frame_err %0d cpi %0d pw_switch %0d stagger %0d jitter %0d bite %0d clamp %0d cut %0d",
             n_wr, n_ferr, n_cpi, n_pw_switch, n_stagger, n_jitter, n_bite, n_clamp, n_cut);
    $display("doppler %0d up %0d down %0d retune %0d att %0d noise %0d", n_doppler, n_up, n_down, n_retune, n_att, n_noise);
    chk(n_wr > 0, "register writes");       chk(n_ferr == 1, "frame error");
    chk(n_cpi > 0, "CPI");                   chk(n_pw_switch > 0, "pulse width switch");
    chk(n_stagger > 0, "stagger");           chk(n_jitter > 0, "jitter");
    chk(n_bite > 0, "BITE");                 chk(n_clamp > 0, "BITE range clamp");
    chk(n_cut > 0, "BITE cut by PRT");       chk(n_doppler > 0, "doppler");
    chk(n_up > 0, "up-chirp");               chk(n_down > 0, "down-chirp");
    chk(n_retune > 1, "IF retune");          chk(n_att > 0, "attenuation");
    chk(n_noise > 0, "noise");
    $display("second radar PRIs %0d, if_mix quiet %0d, with second radar %0d", n_r1_pri, n_mix_quiet, n_mix_r1);
    chk(n_r1_pri > 20, "second radar PRIs");
    chk(n_mix_quiet > 1000, "if_mix while the second radar is quiet");
    chk(n_mix_r1 > 100, "second radar in if_mix");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
