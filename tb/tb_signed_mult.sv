// tb_signed_mult: random and extreme operands against the product computed in
// 64-bit arithmetic; one-clock latency.
module tb_signed_mult;
  logic clk = 0, rst_n = 1;
  logic signed [15:0] a = '0, b = '0;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  signed_mult #(.A_W(16), .B_W(16)) dut (.clk, .rst_n, .a, .b, .p);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 1000; i++) begin
      case (i)
        0: begin a = -16'sd32768; b = -16'sd32768; end
        1: begin a = 16'sd32767;  b = -16'sd32768; end
        2: begin a = -16'sd1;     b = 16'sd32767;  end
        default: begin a = 16'($urandom); b = 16'($urandom); end
      endcase
      e = longint'(a) * longint'(b);
      @(posedge clk); #1;
      checks++;
      if (longint'(p) != e) begin failures++; $display("FAIL %0d*%0d=%0d", a, b, p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
