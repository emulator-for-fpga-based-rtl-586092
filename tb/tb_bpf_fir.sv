// tb_bpf_fir: impulse response against taps designed here from the same
// specification (windowed band pass, unit gain at the centre), then the
// steady-state response to tones: near unity at the IF (a quarter of the
// sample rate), strongly attenuated near DC and near half the sample rate.
module tb_bpf_fir;
  localparam int NT = 31;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 1;
  logic signed [15:0] x = '0, y;
  int checks = 0, failures = 0;
  real h [NT];

  bpf_fir #(.NTAPS(NT)) dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // peak output amplitude for a tone of frequency f (cycles/sample), amplitude 16000
  task automatic tone(input real f, output real peak);
    peak = 0.0;
    for (int n = 0; n < 400; n++) begin
      x = 16'($rtoi(16000.0 * $cos(2.0 * PI * f * n)));
      @(posedge clk); #1;
      if (n > 2 * NT && ($itor(y) > peak)) peak = $itor(y);
      if (n > 2 * NT && (-$itor(y) > peak)) peak = -$itor(y);
    end
  endtask

  initial begin
    real g, pk;
    // reference taps
    g = 0.0;
    for (int n = 0; n < NT; n++) begin
      real m, w;
      m = n - (NT - 1) / 2.0;
      h[n] = (m == 0.0) ? 0.4 : ($sin(2.0 * PI * 0.35 * m) - $sin(2.0 * PI * 0.15 * m)) / (PI * m);
      w = 0.54 - 0.46 * $cos(2.0 * PI * n / (NT - 1));
      h[n] = h[n] * w;
      g += h[n] * $cos(2.0 * PI * 0.25 * m);
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // impulse of 2^14 (one unit in the tap scaling): output k+1 clocks later = h[k]
    x = 16'sd16384;
    @(posedge clk); #1;
    x = '0;
    for (int k = 0; k < NT; k++) begin
      real e;
      e = h[k] / g * 16384.0;
      chk($itor(y) - e < 1.6 && e - $itor(y) < 1.6, $sformatf("tap %0d: %0d exp %f", k, y, e));
      @(posedge clk); #1;
    end
    chk(y == 0, "impulse response ends");
    tone(0.25, pk);
    chk(pk > 15500.0 && pk < 16500.0, $sformatf("gain at IF: peak %f", pk));
    tone(0.21, pk);
    chk(pk > 14000.0, $sformatf("gain at passband edge of chirp: peak %f", pk));
    tone(0.02, pk);
    chk(pk < 400.0, $sformatf("near DC: peak %f", pk));
    tone(0.48, pk);
    chk(pk < 400.0, $sformatf("near fs/2: peak %f", pk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
