// tb_dds: checks the DDS against a model of its phase accumulator and an
// independently computed sine: output values, the two-clock latency, zero
// output while disabled, and the effect of a phase offset.
module tb_dds;
  import radar_pkg::*;
  localparam int LUT_AW = 10;
  logic clk = 0, rst_n = 1, en = 0;
  phase_t ftw = '0, off = '0;
  logic signed [15:0] c, s;
  logic v;
  int checks = 0, failures = 0;

  dds #(.LUT_AW(LUT_AW), .OUT_W(16)) dut (.clk, .rst_n, .en, .ftw, .phase_off(off),
    .cos_o(c), .sin_o(s), .valid_o(v));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sin(input int unsigned idx);
    return $rtoi($floor(32767.0 * $sin(2.0 * 3.14159265358979 * idx / 1024.0) + 0.5));
  endfunction

  // model: inputs sampled at edge k -> outputs visible after edge k+1
  phase_t acc_m;
  int exp_c [$], exp_s [$];
  logic exp_v [$];

  task automatic run(input int n, input logic e);
    for (int i = 0; i < n; i++) begin
      en <= e;
      @(posedge clk);
      begin
        int unsigned ix;
        ix = (acc_m + off) >> 22;
        exp_s.push_back(e ? ref_sin(ix) : 0);
        exp_c.push_back(e ? ref_sin((ix + 256) % 1024) : 0);
        exp_v.push_back(e);
        acc_m = acc_m + ftw;
      end
      #1;
      if (exp_v.size() > 1) begin
        int ec, es; logic ev;
        ec = exp_c.pop_front(); es = exp_s.pop_front(); ev = exp_v.pop_front();
        checks++;
        if (v !== ev || c != 16'(ec) || s != 16'(es)) begin
          failures++;
          if (failures < 10) $display("mismatch: v=%0b/%0b c=%0d/%0d s=%0d/%0d", v, ev, c, ec, s, es);
        end
      end
    end
  endtask

  initial begin
    acc_m = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    ftw = 32'h1000_0000;       // f_clk / 16
    // the accumulator starts counting at the first clock after reset
    run(40, 1'b0);
    run(200, 1'b1);
    off = 32'h4000_0000;       // quarter turn
    run(100, 1'b1);
    off = '0;
    ftw = 32'h1234_5679;       // arbitrary frequency
    run(500, 1'b1);
    run(30, 1'b0);
    run(30, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
