// tb_rom_select: the selected region's base and length for each pulse width,
// a change taking effect only at the CPI strobe, and the bypass at the strobe.
module tb_rom_select;
  import radar_pkg::*;
  localparam int BASE = 64;
  logic clk = 0, rst_n = 1, cpi = 0;
  logic [1:0] sel_in = '0, sel;
  logic [9:0] base;
  time_t len;
  int checks = 0, failures = 0;

  rom_select #(.BASE_LEN(BASE), .N_PW(4)) dut (.clk, .rst_n, .cpi, .pw_sel_in(sel_in), .pw_sel(sel), .base, .len);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sel(input int k);
    int b;
    b = 0;
    for (int j = 0; j < k; j++) b += BASE << j;   // regions laid back to back
    checks++;
    if (sel != 2'(k) || base != 10'(b) || len != TIME_W'(BASE << k)) begin
      failures++;
      $display("FAIL sel=%0d base=%0d len=%0d, expected %0d %0d %0d", sel, base, len, k, b, BASE << k);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    expect_sel(0);
    for (int k = 0; k < 4; k++) begin
      sel_in = 2'((k + 1) % 4);
      #1; expect_sel(k);                  // no CPI: old choice stays
      @(posedge clk); #1; expect_sel(k);
      cpi = 1; #1; expect_sel((k + 1) % 4); // bypass at the strobe
      @(posedge clk); #1; cpi = 0; #1;
      expect_sel((k + 1) % 4);            // held after it
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
