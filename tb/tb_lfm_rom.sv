// tb_lfm_rom: reads every coefficient of a reduced ROM (8-sample base pulse,
// three pulse widths) and compares it with the chirp formula evaluated here;
// checks that each region's instantaneous frequency rises through the pulse
// (up-chirp), the one-clock read latency and the zero output when not read.
module tb_lfm_rom;
  import radar_pkg::*;
  localparam int BASE = 8, NPW = 3;
  localparam real BW = 0.25;
  localparam int AW = $clog2(BASE * 7);
  logic clk = 0, rst_n = 1, rd_en = 0;
  logic [AW-1:0] addr = '0;
  sample_t i_o, q_o;
  logic v;
  int checks = 0, failures = 0;

  lfm_rom #(.BASE_LEN(BASE), .N_PW(NPW), .BW_FRAC(BW)) dut (.clk, .rst_n, .rd_en, .addr, .i_o, .q_o, .valid_o(v));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int a;
    real prev_f;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    a = 0;
    for (int k = 0; k < NPW; k++) begin
      int n_k;
      real last_ph;
      n_k = BASE << k;
      for (int n = 0; n < n_k; n++) begin
        real ph, x, ei, eq, ang;
        x  = n - n_k / 2.0;
        ph = 3.14159265358979 * BW * x * x / n_k;
        ei = 32767.0 * $cos(ph);
        eq = 32767.0 * $sin(ph);
        rd_en <= 1; addr <= AW'(a);
        @(posedge clk); #1;
        chk(v == 1'b1, "valid");
        chk((i_o - ei) < 1.0 && (ei - i_o) < 1.0, $sformatf("I[%0d]=%0d exp %f", a, i_o, ei));
        chk((q_o - eq) < 1.0 && (eq - q_o) < 1.0, $sformatf("Q[%0d]=%0d exp %f", a, q_o, eq));
        // instantaneous frequency from the stored samples: angle step between samples
        ang = $atan2(real'(q_o), real'(i_o));
        if (n > 0) begin
          real d;
          d = ang - last_ph;
          while (d > 3.14159265358979) d -= 2.0 * 3.14159265358979;
          while (d < -3.14159265358979) d += 2.0 * 3.14159265358979;
          if (n > 1) chk(d > prev_f, $sformatf("frequency not rising at %0d", a));
          prev_f = d;
        end
        last_ph = ang;
        a++;
      end
    end
    rd_en <= 0;
    @(posedge clk); #1;
    chk(v == 1'b0 && i_o == 0 && q_o == 0, "idle output zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
