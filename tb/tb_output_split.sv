// tb_output_split: routing of PRT-tagged samples to radar_signal and of
// BITE-tagged samples to bite_out, the attenuation shift, the noise added to
// bite_out at all times (checked against a noise model) and saturation.
module tb_output_split;
  import radar_pkg::*;
  logic clk = 0, rst_n = 1;
  sample_t if_in = '0, rs, bo;
  src_e src = SRC_NONE;
  logic [2:0] att = '0;
  logic [1:0] nl = '0;
  int checks = 0, failures = 0;

  output_split dut (.clk, .rst_n, .if_in, .src, .att, .noise_level(nl), .radar_signal(rs), .bite_out(bo));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] s;   // model of the noise generator state
  initial begin
    s = 32'h2545_F491;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int n_now, ne, e_bo, e_rs;
      // noise value presented this clock (model state advanced once per clock)
      n_now = (i == 0) ? 0 : int'(signed'(s[7:0])) + int'(signed'(s[15:8])) + int'(signed'(s[23:16])) + int'(signed'(s[31:24]));
      if (i > 0) begin s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5); end
      if_in = sample_t'($urandom);
      if (i % 400 == 7) if_in = 16'sh7FF0;
      src = src_e'($urandom_range(0, 2));
      att = 3'($urandom);
      nl  = (i < 1000) ? 2'd0 : 2'($urandom);
      if (i % 400 == 7) begin src = SRC_BITE; att = 0; nl = 3; end
      ne = (nl == 0) ? 0 : (nl == 1) ? (n_now >>> 2) : (nl == 2) ? (n_now >>> 1) : n_now;
      e_rs = (src == SRC_PRT) ? int'(if_in) : 0;
      e_bo = ((src == SRC_BITE) ? (int'(if_in) >>> att) : 0) + ne;
      if (e_bo > 32767) e_bo = 32767;
      if (e_bo < -32768) e_bo = -32768;
      @(posedge clk); #1;
      checks++;
      if (int'(rs) != e_rs || int'(bo) != e_bo) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d src=%0d rs=%0d/%0d bo=%0d/%0d", i, src, rs, e_rs, bo, e_bo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
