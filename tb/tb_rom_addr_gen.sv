// tb_rom_addr_gen: a full pulse (len addresses from base), a pulse cut short
// by the cover pulse falling, a cover pulse longer than the region (the
// generator stops at len), and a restart by the start strobe mid-pulse.
module tb_rom_addr_gen;
  import radar_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 1, start = 0, gate = 0;
  logic [AW-1:0] base = '0, addr;
  time_t len = '0;
  logic rd_en;
  int checks = 0, failures = 0;

  rom_addr_gen #(.AW(AW)) dut (.clk, .rst_n, .start, .gate, .base, .len, .addr, .rd_en);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive a cover pulse of 'cycles' clocks; check outputs one clock behind
  task automatic pulse(input int b, input int l, input int cycles, input int restart_at);
    int cnt;
    base = AW'(b); len = TIME_W'(l);
    cnt = 0;
    for (int i = 0; i <= cycles; i++) begin
      start = (i == 0 || i == restart_at) && i < cycles;
      gate  = i < cycles;
      if (i == restart_at) cnt = 0;
      @(posedge clk); #1;
      if (i < cycles) begin
        checks++;
        if (cnt < l) begin
          if (!rd_en || addr != AW'(b + cnt)) begin
            failures++; $display("FAIL i=%0d addr=%0d rd=%0b exp %0d", i, addr, rd_en, b + cnt);
          end
          cnt++;
        end else if (rd_en) begin
          failures++; $display("FAIL read past len at i=%0d", i);
        end
      end
    end
    checks++;
    if (rd_en) begin failures++; $display("FAIL rd_en after the cover pulse"); end
    start = 0; gate = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    pulse(0, 64, 64, -1);
    pulse(64, 128, 50, -1);
    pulse(192, 16, 40, -1);
    pulse(448, 32, 40, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
