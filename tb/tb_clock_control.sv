// tb_clock_control: the reset is released two clocks after the board reset,
// a switch change is accepted only after it has held for DEBOUNCE clocks (a
// shorter glitch is ignored), and the decoded tuning word, attenuation and
// noise level.
module tb_clock_control;
  import radar_pkg::*;
  localparam int DEB = 8;
  logic clk = 0, ext_rst_n = 1, rst_n;
  logic [6:0] sw = '0;
  phase_t ftw;
  logic [2:0] att;
  logic [1:0] nl;
  int checks = 0, failures = 0;

  clock_control #(.DEBOUNCE(DEB)) dut (.clk, .ext_rst_n, .sw, .rst_n, .ftw, .att, .noise_level(nl));

  always #5 clk = ~clk;
  initial #1 ext_rst_n = 0;   // a real edge, so the asynchronous reset acts at once
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

  function automatic phase_t ftw_exp(input int khz);
    return phase_t'(longint'($floor(real'(khz) / 160000.0 * 4294967296.0 + 0.5)));
  endfunction

  initial begin
    repeat (3) @(posedge clk); #1;
    chk(rst_n == 0, "reset held");
    ext_rst_n = 1;
    @(posedge clk); #1; chk(rst_n == 0, "reset after 1 clock");
    @(posedge clk); #1; chk(rst_n == 1, "reset released after 2 clocks");
    chk(ftw == ftw_exp(40000), "40 MHz after reset");
    // glitch shorter than the debounce time
    sw = 7'h01;
    repeat (4) @(posedge clk);
    #1 sw = '0;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      chk(ftw == ftw_exp(40000), "glitch ignored");
    end
    // settings held long enough
    begin
      int khz [4] = '{40000, 38000, 42000, 44000};
      for (int k = 0; k < 16; k++) begin
        logic [6:0] v;
        v = 7'($urandom);
        sw = v;
        repeat (DEB + 3) @(posedge clk); #1;
        chk(ftw == ftw_exp(khz[v[1:0]]), $sformatf("ftw for %0d", v[1:0]));
        chk(att == v[4:2] && nl == v[6:5], "att/noise");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
