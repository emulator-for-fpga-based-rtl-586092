// timing_gen: the radar timing generator. Produces the PRT cover pulse that
// frames each transmitted chirp, a start strobe for each PRT, and a one-clock
// CPI strobe at the first PRT of each coherent processing interval.
//
// Each pulse repetition interval (PRI) is taken in turn from a table of up to
// NUM_PRI values (staggered PRI: index 0..stagger_last, then back to 0), and a
// pseudo-random jitter (a 16-bit LFSR, ANDed with jitter_mask) is added to it
// (jittered PRI). The PRT cover pulse is high for the first pulse_len clocks of
// each PRI. A CPI spans cpi_pulses PRIs (0 means 256). PRI values and jitter
// settings are sampled when a PRI begins; pulse_len is used as it stands. A PRI
// shorter than 2 clocks is stretched to 2.
//
// The first PRI begins one clock after reset is released (or after en rises);
// while en is low all outputs are low and the generator waits at the start of
// a CPI.
// The document names the timing generator and the PRT and CPI signals and
// mentions staggered and jittered PRI; it derives the timing from encoder data
// it does not describe. Free-running counters are this design's choice.
module timing_gen
  import radar_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  time_t [NUM_PRI-1:0]      pri,
  input  logic [1:0]               stagger_last,
  input  time_t                    jitter_mask,
  input  logic [7:0]               cpi_pulses,
  input  time_t                    pulse_len,
  output logic                     prt,          // transmit cover pulse
  output logic                     prt_start,    // first clock of each PRI
  output logic                     cpi,          // first clock of each CPI
  output logic [1:0]               pri_idx,      // PRI table entry in use
  output time_t                    period        // length of the current PRI
);

  time_t       t;          // clocks since the PRI began
  logic [1:0]  idx;        // PRI table entry for the next PRI
  logic [7:0]  pulse_cnt;  // PRIs begun in this CPI
  logic [15:0] lfsr;
  time_t       next_period;
  logic        run;        // en has been high for a clock: counting

  assign prt_start = run && (t == '0);
  assign cpi       = prt_start && (pulse_cnt == '0);
  assign prt       = run && (t < pulse_len);

  always_comb begin
    next_period = pri[idx] + (jitter_mask & TIME_W'(lfsr));
    if (next_period < TIME_W'(2)) next_period = TIME_W'(2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      idx       <= '0;
      pulse_cnt <= '0;
      lfsr      <= 16'hACE1;
      period    <= '0;
      pri_idx   <= '0;
      run       <= 1'b0;
    end else if (!en || !run) begin
      t         <= '0;
      idx       <= '0;
      pulse_cnt <= '0;
      run       <= en;
    end else begin
      if (t == '0) begin
        // a PRI begins: fix its length and step the stagger/jitter state
        period    <= next_period;
        pri_idx   <= idx;
        idx       <= (idx >= stagger_last) ? 2'd0 : idx + 2'd1;
        lfsr      <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
        pulse_cnt <= (pulse_cnt == cpi_pulses - 8'd1) ? 8'd0 : pulse_cnt + 8'd1;
        t         <= TIME_W'(1);
      end else if (t >= period - TIME_W'(1)) begin
        t <= '0;
      end else begin
        t <= t + TIME_W'(1);
      end
    end
  end

endmodule
