// tb_upconversion_unit: the whole baseband-and-upconversion chain with a
// 16-sample base pulse. Every sample of if_raw is compared with
// cos(w n)I(n) - sin(w n)Q(n) (or + for a down-chirp), scaled by 2^-15, where
// the carrier comes from a model of the phase accumulator and the
// coefficients from the chirp formula, both evaluated here. Covers transmit
// pulses of each pulse width, a BITE pulse with a doppler phase offset, a
// down-chirp CPI, a transmit pulse followed directly by a BITE pulse, the
// four-clock latency, and the tag that marks the filtered output.
module tb_upconversion_unit;
  import radar_pkg::*;
  localparam int BASE = 16;
  localparam real BW = 0.125, PI = 3.14159265358979;
  localparam int NT = 31, LAT_OUT = 5 + (NT - 1) / 2;
  logic clk = 0, rst_n = 1, cpi = 0, down = 0;
  src_e src = SRC_NONE, src_out;
  pw_sel_t sel = '0, sel_used;
  phase_t ftw = 32'h4000_0000, bph = '0;
  time_t plen;
  sample_t if_raw, if_out;
  int checks = 0, failures = 0;

  upconversion_unit #(.BASE_LEN(BASE), .BW_FRAC(BW), .NTAPS(NT)) dut (
    .clk, .rst_n, .src, .cpi, .pw_sel_in(sel), .chirp_down_in(down), .ftw, .bite_phase(bph),
    .pulse_len(plen), .pw_sel(sel_used), .if_raw, .if_out, .src_out);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tab(input int unsigned i);
    return $rtoi($floor(32767.0 * $sin(2.0 * PI * (i % 1024) / 1024.0) + 0.5));
  endfunction
  function automatic int coef(input int n, input int nk, input bit want_sin);
    real x, ph;
    x = n - nk / 2.0;
    ph = PI * BW * x * x / nk;
    return $rtoi($floor(32767.0 * (want_sin ? $sin(ph) : $cos(ph)) + 0.5));
  endfunction

  // model state
  phase_t acc;            // accumulator value before the coming edge
  int exp_q [$];          // expected if_raw, 3 edges after sampling
  src_e tag_q [$];
  int pos, nk;            // sample index in the current pulse, its length
  src_e prev;
  bit mode_down;
  int outs_prt, outs_bite, energy_bad;
  real e_on, e_off;

  // evaluated just before each edge, with the inputs the DUT samples
  always @(negedge clk) if (rst_n) begin
    int e;
    e = 0;
    if (cpi) begin nk = BASE << sel; mode_down = down; end
    if (src != SRC_NONE && src != prev) pos = 0;
    if (src != SRC_NONE && pos < nk) begin
      int unsigned ix;
      longint c, s, ci, cq, v;
      ix = (acc + ((src == SRC_BITE) ? bph : 32'd0)) >> 22;
      s = tab(ix); c = tab(ix + 256);
      ci = coef(pos, nk, 0); cq = coef(pos, nk, 1);
      v = mode_down ? (c * ci + s * cq) : (c * ci - s * cq);
      v = v >>> 15;
      if (v > 32767) v = 32767;
      if (v < -32768) v = -32768;
      e = int'(v);
      pos++;
    end
    exp_q.push_back(e);
    tag_q.push_back(src);
    prev = src;
    acc = acc + ftw;
  end

  always @(posedge clk) if (rst_n) begin
    #1;
    if (exp_q.size() > 3) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(if_raw) != e) begin
        failures++;
        if (failures < 10) $display("FAIL if_raw %0d exp %0d at %0t", if_raw, e, $time);
      end
    end
    if (tag_q.size() > LAT_OUT - 1) begin
      src_e t;
      t = tag_q.pop_front();
      checks++;
      if (t != src_out) begin failures++; if (failures < 10) $display("FAIL src_out"); end
      if (t == SRC_PRT) outs_prt++;
      if (t == SRC_BITE) outs_bite++;
      // the filtered chirp is strong where the tag marks it
      if (t != SRC_NONE) e_on += real'(if_out) * real'(if_out);
    end
  end

  task automatic pulse(input src_e s, input int n, input int gap, input bit with_cpi);
    for (int i = 0; i < n; i++) begin
      src = s; cpi = with_cpi && i == 0;
      @(posedge clk); #1;
    end
    cpi = 0; src = SRC_NONE;
    repeat (gap) @(posedge clk); #1;
  endtask

  initial begin
    acc = '0; nk = BASE; prev = SRC_NONE; mode_down = 0; pos = 0;
    outs_prt = 0; outs_bite = 0; e_on = 0.0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    for (int k = 0; k < 4; k++) begin
      sel = pw_sel_t'(k);
      pulse(SRC_PRT, BASE << k, 40, 1);
      checks++;
      if (plen != TIME_W'(BASE << k) || sel_used != pw_sel_t'(k)) begin failures++; $display("FAIL pulse_len %0d", plen); end
    end
    // selection changes without a CPI are not taken
    sel = 2'd0;
    pulse(SRC_PRT, BASE << 3, 40, 0);
    // BITE with a doppler phase offset, then a down-chirp CPI
    bph = 32'h4000_0000;
    pulse(SRC_BITE, BASE << 3, 40, 0);
    ftw = 32'h3C00_0000; bph = 32'h1234_5678; down = 1; sel = 2'd1;
    pulse(SRC_PRT, BASE << 1, 0, 1);
    pulse(SRC_BITE, BASE << 1, 20, 0);      // back to back with the PRT
    pulse(SRC_PRT, BASE << 1, 5, 0);
    repeat (LAT_OUT + 5) @(posedge clk); #1;
    checks++;
    if (outs_prt == 0 || outs_bite == 0) begin failures++; $display("FAIL tags never seen"); end
    checks++;
    if (e_on / real'(outs_prt + outs_bite) < 1.0e7) begin failures++; $display("FAIL filtered chirp weak: %f", e_on / real'(outs_prt + outs_bite)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
