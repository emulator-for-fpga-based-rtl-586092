// tb_timing_gen: PRI lengths follow the stagger table, the PRT cover pulse
// has the pulse length, the CPI strobe comes every cpi_pulses PRIs, and with
// jitter enabled each PRI exceeds its table value by no more than the mask and
// the PRIs do vary.
module tb_timing_gen;
  import radar_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  time_t [NUM_PRI-1:0] pri;
  logic [1:0] stagger_last = 2'd2;
  time_t jitter_mask = '0, pulse_len = TIME_W'(20);
  logic [7:0] cpi_pulses = 8'd5;
  logic prt, prt_start, cpi;
  logic [1:0] pri_idx;
  time_t period;
  int checks = 0, failures = 0;

  timing_gen dut (.clk, .rst_n, .en, .pri, .stagger_last, .jitter_mask, .cpi_pulses,
    .pulse_len, .prt, .prt_start, .cpi, .pri_idx, .period);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // observe n PRIs; returns the measured lengths
  int lens [$];
  int starts_seen, cpis_seen;
  task automatic observe(input int n);
    int cyc, last_start, hi, pulses;
    lens.delete();
    last_start = -1; hi = 0; pulses = 0; cyc = 0;
    while (pulses <= n) begin
      @(negedge clk);
      if (prt_start) begin
        if (last_start >= 0) begin
          lens.push_back(cyc - last_start);
          chk(hi == int'(pulse_len), $sformatf("PRT width %0d", hi));
        end
        chk(cpi == (starts_seen % int'(cpi_pulses) == 0), $sformatf("cpi at PRI %0d", starts_seen));
        if (cpi) cpis_seen++;
        starts_seen++;
        last_start = cyc; hi = 0; pulses++;
      end
      if (prt) hi++;
      cyc++;
    end
  endtask

  initial begin
    pri[0] = 100; pri[1] = 130; pri[2] = 170; pri[3] = 999;
    starts_seen = 0; cpis_seen = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1; en <= 1;
    observe(9);
    foreach (lens[i]) chk(lens[i] == int'(pri[i % 3]), $sformatf("stagger PRI %0d = %0d", i, lens[i]));
    chk(cpis_seen == 2, $sformatf("cpi count %0d", cpis_seen));
    // jitter: restart so the sequence is known, 4-entry stagger
    en <= 0; @(posedge clk);
    starts_seen = 0;
    stagger_last = 2'd3; pri[3] = 150;
    jitter_mask = TIME_W'(15);
    en <= 1;
    observe(12);
    begin
      int diff_seen;
      diff_seen = 0;
      foreach (lens[i]) begin
        int d;
        d = lens[i] - int'(pri[i % 4]);
        chk(d >= 0 && d <= 15, $sformatf("jitter %0d", d));
        if (d != 0) diff_seen++;
      end
      chk(diff_seen > 3, "jitter present");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
