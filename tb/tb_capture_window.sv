// tb_capture_window: the emulator at its default parameters, observed the way
// an on-chip logic analyser would: a 4096-sample capture of radar_signal and
// bite_out triggered by a PRT start. Over the serial link it selects the
// 512-sample pulse and a BITE range of 1500 clocks, and the switches set
// 12 dB of attenuation and the lowest noise level, so that the transmit chirp
// and its echo both fall inside one capture. Checks on the captured window:
//  - radar_signal is non-zero only in its 512 samples, 21 clocks after the
//    trigger (the chain latency), and is strong there;
//  - the echo on bite_out lies 1500 + 21 clocks after the trigger and stands
//    well above the noise floor, about 12 dB below the transmit level;
//  - bite_out carries noise everywhere else, with the expected power.
module tb_capture_window;
  import radar_pkg::*;
  localparam int CPB = 1389, DEPTH = 4096, LAT = 21 - 1, LEN = 512, RANGE = 1500;
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
  initial #1 ext_rst_n = 0;    // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic uart_byte(input logic [7:0] b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (2 * CPB) @(posedge clk);
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    uart_byte(8'hA5); uart_byte(a);
    uart_byte(d[31:24]); uart_byte(d[23:16]); uart_byte(d[15:8]); uart_byte(d[7:0]);
  endtask

  sample_t cap_r [DEPTH];
  sample_t cap_b [DEPTH];

  initial begin
    real e_tx, e_echo, e_noise, e_r_out;
    int n_noise, r_out;
    repeat (3) @(posedge clk); #1;
    ext_rst_n = 1;
    sw = 7'b01_010_00;                 // 40 MHz, attenuation 2 (12 dB), noise level 1
    wr(8'd6, 32'(RANGE));
    wr(8'd4, 32'h0000_1023);           // 16 PRIs per CPI, BITE on, up-chirp, pulse width 3
    // wait for a CPI so that the long pulse is in force, then trigger on it
    // capture sample i is clock c+1+i, where c is the clock of the CPI strobe
    @(posedge clk iff cpi);
    #1;
    for (int i = 0; i < DEPTH; i++) begin
      cap_r[i] = radar_signal; cap_b[i] = bite_out;
      @(posedge clk); #1;
    end
    chk(pw_sel == 2'd3, "512-sample pulse in force");
    e_tx = 0; e_echo = 0; e_noise = 0; e_r_out = 0; n_noise = 0; r_out = 0;
    for (int i = 0; i < DEPTH; i++) begin
      real r2, b2;
      r2 = real'(cap_r[i]) * real'(cap_r[i]);
      b2 = real'(cap_b[i]) * real'(cap_b[i]);
      if (i >= LAT && i < LAT + LEN) e_tx += r2;
      else if (cap_r[i] != 0) r_out++;
      if (i >= RANGE + LAT && i < RANGE + LAT + LEN) e_echo += b2;
      else if (i >= LAT + LEN + 40 && (i < RANGE || i >= RANGE + LAT + LEN + 40)) begin e_noise += b2; n_noise++; end
    end
    e_tx /= LEN; e_echo /= LEN; e_noise /= n_noise;
    $display("capture: transmit power %e, echo power %e, noise power %e", e_tx, e_echo, e_noise);
    chk(r_out == 0, $sformatf("radar_signal non-zero outside the pulse: %0d samples", r_out));
    chk(e_tx > 1.0e8, "transmit chirp present");
    // 12 dB attenuation: power 1/16 of the transmit power (plus noise)
    chk(e_echo > e_tx / 25.0 && e_echo < e_tx / 10.0, "echo 12 dB below the transmit pulse");
    // noise level 1: (sum of four signed bytes) / 4, variance about 21845 / 16
    chk(e_noise > 1000.0 && e_noise < 1800.0, "noise floor");
    chk(e_echo > 100.0 * e_noise, "echo well above the noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
