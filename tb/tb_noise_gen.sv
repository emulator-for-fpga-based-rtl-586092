// tb_noise_gen: the noise sequence against an xorshift model written here,
// and its statistics over 20000 samples: mean near zero, standard deviation
// near the 147.8 of a sum of four uniform bytes, and a bell shape (more values
// within one standard deviation than a uniform distribution would give).
module tb_noise_gen;
  logic clk = 0, rst_n = 1;
  logic signed [9:0] nz;
  int checks = 0, failures = 0;

  noise_gen dut (.clk, .rst_n, .noise_o(nz));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] s;
    real sum, sq, mean, sd;
    int inner, mism;
    s = 32'h2545_F491; sum = 0; sq = 0; inner = 0; mism = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 20000; i++) begin
      int e;
      e = int'(signed'(s[7:0])) + int'(signed'(s[15:8])) + int'(signed'(s[23:16])) + int'(signed'(s[31:24]));
      if (int'(nz) != e) mism++;
      sum += nz; sq += real'(nz) * real'(nz);
      if (nz > -148 && nz < 148) inner++;
      s = s ^ (s << 13); s = s ^ (s >> 17); s = s ^ (s << 5);
      @(posedge clk); #1;
    end
    mean = sum / 20000.0;
    sd = $sqrt(sq / 20000.0 - mean * mean);
    checks++; if (mism != 0) begin failures++; $display("FAIL %0d samples differ from the model", mism); end
    checks++; if (mean > 5.0 || mean < -5.0) begin failures++; $display("FAIL mean %f", mean); end
    checks++; if (sd < 140.0 || sd > 156.0) begin failures++; $display("FAIL sd %f", sd); end
    checks++; if (inner < 12600) begin failures++; $display("FAIL within 1 sd: %0d", inner); end
    $display("mean %f sd %f within-1sd %0d", mean, sd, inner);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
