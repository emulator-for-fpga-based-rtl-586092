// tb_param_regs: reset values, each register written by a sync/address/data
// command, junk bytes before a sync skipped, an unknown address ignored. A
// second bank at base address 8 on the same byte stream takes only its own
// addresses.
module tb_param_regs;
  import radar_pkg::*;
  logic clk = 0, rst_n = 1, rx_valid = 0, wr;
  logic [7:0] rx_data = '0;
  radar_cfg_t cfg, cfg1;
  logic wr1;
  int checks = 0, failures = 0, writes = 0, writes1 = 0;

  param_regs #(.DEF_PRI(1000), .DEF_CPI_PULSES(16), .DEF_RANGE(300)) dut (.clk, .rst_n, .rx_data, .rx_valid, .cfg, .wr_pulse(wr));

  param_regs #(.DEF_PRI(1100), .DEF_RANGE(400), .BASE_ADDR(8)) dut1 (.clk, .rst_n, .rx_data, .rx_valid, .cfg(cfg1), .wr_pulse(wr1));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  always @(posedge clk) if (wr) writes++;
  always @(posedge clk) if (wr1) writes1++;
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

  task automatic byte_in(input logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(posedge clk); #1;
    rx_valid = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  task automatic cmd(input logic [7:0] a, input logic [31:0] d);
    byte_in(8'hA5); byte_in(a);
    byte_in(d[31:24]); byte_in(d[23:16]); byte_in(d[15:8]); byte_in(d[7:0]);
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    chk(cfg.pri[0] == 1000 && cfg.pri[3] == 1000 && cfg.cpi_pulses == 16 && cfg.bite_range == 300, "reset values");
    chk(cfg.bite_en == 1 && cfg.doppler_step == 0 && cfg.jitter_mask == 0 && cfg.pw_sel == 0, "reset values 2");
    byte_in(8'h00); byte_in(8'h13);          // junk
    cmd(8'd0, 32'd1234); cmd(8'd1, 32'd2345); cmd(8'd2, 32'd3456); cmd(8'd3, 32'h000F_FFFF);
    chk(cfg.pri[0] == 1234 && cfg.pri[1] == 2345 && cfg.pri[2] == 3456 && cfg.pri[3] == 20'hFFFFF, "PRI table");
    cmd(8'd4, 32'h0000_2A3E);                // cpi 0x2A, bite_en 1, down 1, stagger 3, pw 2
    chk(cfg.pw_sel == 2 && cfg.stagger_last == 3 && cfg.chirp_down == 1 && cfg.bite_en == 1 && cfg.cpi_pulses == 8'h2A, "control");
    cmd(8'd4, 32'h0000_0101);
    chk(cfg.pw_sel == 1 && cfg.stagger_last == 0 && cfg.chirp_down == 0 && cfg.bite_en == 0 && cfg.cpi_pulses == 1, "control 2");
    cmd(8'd5, 32'h0000_003F); cmd(8'd6, 32'd777); cmd(8'd7, 32'hDEAD_BEEF);
    chk(cfg.jitter_mask == 63 && cfg.bite_range == 777 && cfg.doppler_step == 32'hDEAD_BEEF, "jitter/range/doppler");
    cmd(8'd9, 32'd5);                        // unknown register
    chk(cfg.pri[0] == 1234 && cfg.bite_range == 777, "unknown address ignored");
    chk(writes == 9, $sformatf("write pulses %0d", writes));
    chk(cfg1.pri[0] == 1100 && cfg1.pri[1] == 5 && cfg1.bite_range == 400 && cfg1.doppler_step == 0, "second bank");
    cmd(8'd14, 32'd999); cmd(8'd15, 32'd77); cmd(8'd16, 32'd1);   // bank 1 range, doppler; bank 2
    chk(cfg1.bite_range == 999 && cfg1.doppler_step == 77 && cfg1.pri[0] == 1100 && cfg.bite_range == 777, "second bank 2");
    chk(writes1 == 3 && writes == 9, $sformatf("second bank write pulses %0d", writes1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
