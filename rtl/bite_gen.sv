// bite_gen: built-in-test (BITE) echo generator. Produces the BITE cover pulse
// at a programmable range position after each transmit, and the carrier phase
// offset that gives the echo its doppler.
//
// At each PRT start the range delay, the pulse length and the enable are
// sampled. The BITE cover pulse is then high for pulse_len clocks starting
// range clocks after the PRT start; a range inside the transmit pulse is moved
// to its end, since the radar is transmitting then. The cover pulse ends early
// if the next PRT starts first.
//
// Doppler is made pulse to pulse: at each PRT start the phase offset advances
// by doppler_step (2^PHASE_W is a whole turn). A step between -1/2 and +1/2
// turn per PRI covers every doppler from -PRF/2 to +PRF/2, the limit the
// document states; larger steps alias, as a real doppler above PRF/2 would.
// doppler_step = 0 gives a stationary target. The range/doppler mechanisms are
// from the document; this realisation is this design's.
//
// Timing: bite is registered, and forced low while prt_start is high. With prt_start at clock c it is high on clocks
// c+range .. c+range+pulse_len-1 (range replaced by pulse_len when smaller).
// phase_off changes at c+1 and is steady during the cover pulse.
module bite_gen
  import radar_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    prt_start,
  input  logic    bite_en,
  input  time_t   range,
  input  time_t   pulse_len,
  input  phase_t  doppler_step,
  output logic    bite,
  output phase_t  phase_off
);

  time_t t;          // clocks since PRT start, saturating
  time_t t_on;       // cover pulse start
  time_t t_off;      // cover pulse end (exclusive)
  logic  en_q;
  logic  active;     // a PRT has been seen since reset
  time_t t_nx;       // value of t in the next clock
  time_t on_nx;      // cover pulse start if a PRT starts now
  logic  bite_q;

  assign t_nx  = (t == '1) ? t : t + TIME_W'(1);
  assign on_nx = (range < pulse_len) ? pulse_len : range;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      t_on      <= '0;
      t_off     <= '0;
      en_q      <= 1'b0;
      active    <= 1'b0;
      bite_q    <= 1'b0;
      phase_off <= '0;
    end else if (prt_start) begin
      active    <= 1'b1;
      t         <= TIME_W'(1);
      en_q      <= bite_en;
      t_on      <= on_nx;
      t_off     <= on_nx + pulse_len;
      phase_off <= phase_off + doppler_step;
      bite_q    <= bite_en && (on_nx == TIME_W'(1)) && (pulse_len != '0);
    end else begin
      t    <= t_nx;
      bite_q <= active && en_q && (t_nx >= t_on) && (t_nx < t_off);
    end
  end

  // a new PRT ends the echo of the previous one at once
  assign bite = bite_q && !prt_start;

endmodule
