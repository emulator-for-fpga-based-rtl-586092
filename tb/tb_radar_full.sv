// tb_radar_full: the emulator with every parameter at its default (160 MHz
// clock, 115200-baud serial link, 64-sample shortest pulse, PRI 16000 clocks,
// BITE at 4000 clocks, 16 PRIs per CPI). It runs one whole CPI, checking each
// PRI length, PRT width, BITE position and width and the output levels;
// meanwhile it selects the longest pulse (512 samples) over the serial link
// and then runs a second CPI to see that pulse width in force from its first
// PRT. The second emulated radar runs alongside at its default PRI of 18000
// clocks with the 64-sample pulse; its PRIs and PRT widths are checked, and
// if_mix is checked to be the sum of the two radars' IF streams.
module tb_radar_full;
  import radar_pkg::*;
  localparam int CPB = 1389;
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

  radar_emulator_top dut (
    .clk, .ext_rst_n, .uart_rxd(rxd), .sw, .if_out, .if_raw, .radar_signal, .bite_out,
    .prt, .bite, .cpi, .uart_frame_err(ferr), .cfg_wr, .pri_idx, .period, .pw_sel,
    .if_mix, .prt_all, .bite_all);

  always #3.125 clk = ~clk;    // 160 MHz
  initial #1 ext_rst_n = 0;   // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  int t, starts, cpis, prt_hi, bite_on, bite_hi, pw_exp;
  real e_rs, e_bo;
  logic prt_q = 0;

  always @(posedge clk) if (dut.rst_n) begin
    #1;
    if (prt && !prt_q) begin
      if (starts > 0) begin
        chk(t == 16000, $sformatf("PRI %0d", t));
        chk(bite_on == 4000 && bite_hi == (64 << pw_exp), $sformatf("BITE at %0d width %0d", bite_on, bite_hi));
        chk(e_rs > 1.0e7 * (64 << pw_exp), $sformatf("radar_signal energy %e", e_rs));
        chk(e_bo > 1.0e7 * (64 << pw_exp), $sformatf("bite_out energy %e", e_bo));
      end
      if (cpi) begin
        if (starts > 0) chk(starts % 16 == 0, "CPI every 16 PRIs");
        cpis++;
        pw_exp = int'(pw_sel);
      end
      starts++;
      t = 0; bite_on = -1; bite_hi = 0; e_rs = 0; e_bo = 0;
    end
    if (prt) prt_hi++;
    if (!prt && prt_q) begin chk(prt_hi == (64 << pw_exp), $sformatf("PRT width %0d", prt_hi)); prt_hi = 0; end
    if (bite) begin if (bite_on < 0) bite_on = t; bite_hi++; end
    e_rs += real'(radar_signal) * real'(radar_signal);
    e_bo += real'(bite_out) * real'(bite_out);
    t++;
    prt_q = prt;
  end

  // second radar and the summed output
  int r1_t = -1, r1_hi = 0, r1_pris = 0, mix_both = 0;
  logic r1_q = 0;
  sample_t if_out_q = '0, if1_q = '0;
  always @(posedge clk) if (dut.rst_n) begin
    #1;
    if (prt_all[1] && !r1_q) begin
      if (r1_t >= 0) begin chk(r1_t + 1 == 18000, $sformatf("second radar PRI %0d", r1_t + 1)); r1_pris++; end
      r1_t = 0;
    end else if (r1_t >= 0) r1_t++;
    if (prt_all[1]) r1_hi++;
    if (!prt_all[1] && r1_q) begin chk(r1_hi == 64, $sformatf("second radar PRT width %0d", r1_hi)); r1_hi = 0; end
    r1_q = prt_all[1];
    if (if_out_q != 0 || if1_q != 0) begin
      chk(if_mix == 17'(if_out_q) + 17'(if1_q), "if_mix is the sum of both radars");
      if (if_out_q != 0 && if1_q != 0) mix_both++;
    end
    if_out_q = if_out; if1_q = dut.g_radar[1].if_out_k;
  end

  task automatic uart_byte(input logic [7:0] b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (2 * CPB) @(posedge clk);
  endtask

  initial begin
    t = 0; starts = 0; cpis = 0; prt_hi = 0; bite_on = -1; bite_hi = 0; pw_exp = 0; e_rs = 0; e_bo = 0;
    repeat (3) @(posedge clk); #1;
    ext_rst_n = 1;
    repeat (1000) @(posedge clk);
    // control register: pulse width 3, BITE on, 16 PRIs per CPI
    uart_byte(8'hA5); uart_byte(8'd4);
    uart_byte(8'h00); uart_byte(8'h00); uart_byte(8'h10); uart_byte(8'h23);
    chk(dut.g_radar[0].cfg.pw_sel == 2'd3, "pulse width register written");
    while (cpis < 2) @(posedge clk);
    chk(pw_sel == 2'd3, "new pulse width at the second CPI");
    while (starts < 18) @(posedge clk);
    chk(pw_exp == 3, "long pulses checked");
    $display("PRIs %0d CPIs %0d, second radar PRIs %0d, samples with both radars %0d", starts, cpis, r1_pris, mix_both);
    chk(r1_pris >= 15, "second radar PRIs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
