// radar_pkg: types and constants shared by the radar signal emulator.
//
// The emulator produces a linear-FM (chirp) pulse at an intermediate frequency
// (IF) during each transmit cover pulse (PRT), and an echo of the same chirp
// (BITE, built-in test) at a programmable range delay and doppler. All blocks
// run on a single clock; one sample per clock.
//
// Widths and the clock rate are this design's choices; the document gives only
// the 40 MHz IF. A 160 MHz sample clock is assumed so that the 40 MHz IF sits
// at a quarter of the sample rate.
package radar_pkg;

  // Sample and coefficient width (signed two's complement).
  parameter int unsigned SAMPLE_W = 16;
  // DDS phase accumulator width.
  parameter int unsigned PHASE_W  = 32;
  // Counter width for PRI, range delay and pulse length (in clocks).
  parameter int unsigned TIME_W   = 20;
  // Number of selectable pulse widths (coefficient ROM regions).
  parameter int unsigned NUM_PW   = 4;
  // Number of PRI values in a stagger sequence.
  parameter int unsigned NUM_PRI  = 4;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic        [TIME_W-1:0]   time_t;
  typedef logic [$clog2(NUM_PW)-1:0]  pw_sel_t;

  // Which cover pulse is driving the waveform chain.
  typedef enum logic [1:0] {
    SRC_NONE = 2'd0,
    SRC_PRT  = 2'd1,   // transmit waveform (RADAR_signal)
    SRC_BITE = 2'd2    // built-in-test echo (BITE_out)
  } src_e;

  // Run-time settings written through the serial control port.
  typedef struct packed {
    time_t [NUM_PRI-1:0] pri;          // PRI values in clocks, used cyclically
    logic  [1:0]         stagger_last; // index of the last PRI in the stagger cycle
    time_t               jitter_mask;  // random PRI jitter, AND-mask on an LFSR
    pw_sel_t             pw_sel;       // selected pulse width
    logic                chirp_down;   // 0: up-chirp (subtract), 1: down-chirp (add)
    logic                bite_en;      // generate the BITE echo
    logic [7:0]          cpi_pulses;   // PRTs per coherent processing interval (0 = 256)
    time_t               bite_range;   // BITE delay from PRT start, in clocks
    phase_t              doppler_step; // BITE phase advance per PRT (2^PHASE_W = one turn)
  } radar_cfg_t;

endpackage
