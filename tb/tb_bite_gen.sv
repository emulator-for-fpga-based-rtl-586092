// tb_bite_gen: the BITE cover pulse position and width relative to the PRT
// start, a range inside the transmit pulse moved to its end, the enable, the
// pulse cut by the next PRT, and the doppler phase advancing by the step.
module tb_bite_gen;
  import radar_pkg::*;
  logic clk = 0, rst_n = 1, prt_start = 0, bite_en = 1;
  time_t range = '0, plen = TIME_W'(16);
  phase_t step = '0;
  logic bite;
  phase_t ph;
  int checks = 0, failures = 0;

  bite_gen dut (.clk, .rst_n, .prt_start, .bite_en, .range, .pulse_len(plen),
    .doppler_step(step), .bite, .phase_off(ph));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;       // a real edge, so the asynchronous reset acts at once
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one PRI of 'pri' clocks; expect bite on clocks [on, on+plen) after the start
  task automatic one_pri(input int pri, input int on, input bit en_exp, input phase_t ph_exp);
    for (int c = 0; c < pri; c++) begin
      prt_start = (c == 0);
      @(posedge clk); #1;
      prt_start = 0;
      // after this edge the registered bite belongs to clock c+1
      if (c + 1 < pri) begin
        bit e;
        e = en_exp && (c + 1 >= on) && (c + 1 < on + int'(plen));
        chk(bite == e, $sformatf("bite at %0d: %0b exp %0b", c + 1, bite, e));
        chk(ph == ph_exp, "doppler phase steady");
      end
    end
  endtask

  initial begin
    phase_t p;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    range = 40; step = 32'h1000_0000; p = '0;
    for (int i = 0; i < 3; i++) begin p += step; one_pri(100, 40, 1, p); end
    range = 5;                    // inside the transmit pulse: moved to 16
    p += step; one_pri(60, 16, 1, p);
    bite_en = 0;
    p += step; one_pri(60, 16, 0, p);
    bite_en = 1; range = 50; step = 32'hF000_0000;   // negative doppler
    p += step; one_pri(58, 50, 1, p);                // cut by the next PRT
    p += step; one_pri(80, 50, 1, p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
