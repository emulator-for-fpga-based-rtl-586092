// tb_add_sub: sums and differences of random products, scaled by 2^-15 and
// saturated, against a 64-bit reference; includes saturating cases.
module tb_add_sub;
  logic clk = 0, rst_n = 1, add = 0;
  logic signed [31:0] a = '0, b = '0;
  logic signed [15:0] y;
  int checks = 0, failures = 0, sats = 0;

  add_sub #(.IN_W(32), .OUT_W(16), .SHIFT(15)) dut (.clk, .rst_n, .add, .a, .b, .y);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s, e;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      add = 1'($urandom);
      a = (i % 3 == 0) ? 32'($urandom) : 32'(signed'(16'($urandom))) * 32'(signed'(16'($urandom)));
      b = (i % 3 == 0) ? 32'($urandom) : 32'(signed'(16'($urandom))) * 32'(signed'(16'($urandom)));
      s = add ? longint'(a) + longint'(b) : longint'(a) - longint'(b);
      e = s >>> 15;
      if (e > 32767) begin e = 32767; sats++; end
      if (e < -32768) begin e = -32768; sats++; end
      @(posedge clk); #1;
      checks++;
      if (longint'(y) != e) begin failures++; if (failures < 10) $display("FAIL add=%0b %0d %0d -> %0d exp %0d", add, a, b, y, e); end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
