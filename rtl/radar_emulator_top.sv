// radar_emulator_top: FPGA radar signal emulator.
//
// Generates, in real time, the transmit waveform of a pulsed radar (a linear-FM
// chirp at the IF, framed by the PRT cover pulse) and a built-in-test echo of
// it (BITE) at a programmable range, doppler, attenuation and noise level.
// NUM_RADARS such radars run side by side, each with its own register bank,
// timing, BITE and waveform chain, and their IF streams are summed into one
// mixed pulse stream (if_mix), the kind of input a deinterleaver is tested on.
//
//   clock_control      reset synchronizer; board switches -> IF frequency,
//                      BITE attenuation, noise level (shared by all radars)
//   uart_rx+param_regs serial control link: PRI table, stagger, jitter, pulse
//                      width, sweep direction, CPI length, BITE range/doppler;
//                      radar k has the register bank at addresses 8k..8k+7
//   timing_gen         PRT cover pulse, PRT start and CPI strobes
//   bite_gen           BITE cover pulse and doppler phase
//   upconversion_unit  DDS x coefficient ROMs -> add/sub -> band-pass FIR
//   output_split       RADAR_signal and BITE_out streams of radar 0
//
// Within one radar the transmit pulse and the echo share one waveform chain in
// time; the transmit pulse has priority. if_out is radar 0's filtered IF for an
// external DAC; radar_signal and bite_out are its two monitored streams, and
// its timing strobes are brought out for triggering an on-chip logic analyser.
// prt_all and bite_all hold the cover pulses of every radar. if_mix is the sum
// of all radars' if_out, one clock later, with enough bits that it never
// overflows.
// For radars after the first, the chain's monitor outputs (PRI index and
// length, pulse width, unfiltered IF, delayed source tag) are connected to
// local signals that nothing reads; lint reports them as unused, by design.
//
// The document gives one radar's chain and states that several radars can be
// emulated at once on the parallel fabric; the number of radars (2), the
// register banks, the default PRIs of the further radars (each 1/8 longer than
// the one before, so that their pulse trains interleave) and the summed output
// are this design's choices.
module radar_emulator_top
  import radar_pkg::*;
#(
  parameter int unsigned CLK_KHZ      = 160_000,
  parameter int unsigned CLKS_PER_BIT = 1389,     // 115200 baud
  parameter int unsigned DEBOUNCE     = 65_536,
  parameter int unsigned BASE_LEN     = 64,
  parameter int unsigned DEF_PRI      = 16_000,
  parameter int unsigned DEF_RANGE    = 4_000,
  parameter int unsigned NUM_RADARS   = 2,        // 1..32
  localparam int unsigned MIX_W       = SAMPLE_W + $clog2(NUM_RADARS)
) (
  input  logic        clk,
  input  logic        ext_rst_n,
  input  logic        uart_rxd,
  input  logic [6:0]  sw,
  output sample_t     if_out,        // filtered IF to the DAC
  output sample_t     if_raw,        // IF before the band-pass filter
  output sample_t     radar_signal,  // RADAR_signal
  output sample_t     bite_out,      // BITE_out
  output logic        prt,
  output logic        bite,
  output logic        cpi,
  output logic        uart_frame_err,
  output logic        cfg_wr,        // a register was written
  output logic [1:0]  pri_idx,       // stagger entry of the current PRI
  output time_t       period,        // length of the current PRI
  output pw_sel_t     pw_sel,        // pulse width in force
  output logic signed [MIX_W-1:0] if_mix,          // sum of all radars' if_out
  output logic [NUM_RADARS-1:0]   prt_all,         // PRT of each radar
  output logic [NUM_RADARS-1:0]   bite_all         // BITE of each radar
);

  logic       rst_n;
  phase_t     ftw;
  logic [2:0] att;
  logic [1:0] noise_level;
  logic [7:0] rx_data;
  logic       rx_valid;
  logic [NUM_RADARS-1:0]               wr_all;
  logic [NUM_RADARS-1:0][SAMPLE_W-1:0] if_all;

  clock_control #(.CLK_KHZ(CLK_KHZ), .DEBOUNCE(DEBOUNCE)) u_ctrl (
    .clk, .ext_rst_n, .sw, .rst_n, .ftw, .att, .noise_level);

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid),
    .frame_err(uart_frame_err));

  for (genvar k = 0; k < NUM_RADARS; k++) begin : g_radar
    radar_cfg_t cfg;
    time_t      pulse_len, period_k;
    logic       prt_k, prt_start, bite_k, cpi_k;
    logic [1:0] pri_idx_k;
    phase_t     bite_phase;
    pw_sel_t    pw_sel_k;
    sample_t    if_out_k, if_raw_k;
    src_e       src, src_out;

    param_regs #(
      .DEF_PRI(DEF_PRI * (8 + k) / 8), .DEF_RANGE(DEF_RANGE), .BASE_ADDR(8 * k)
    ) u_regs (
      .clk, .rst_n, .rx_data, .rx_valid, .cfg, .wr_pulse(wr_all[k]));

    timing_gen u_timing (
      .clk, .rst_n, .en(1'b1), .pri(cfg.pri), .stagger_last(cfg.stagger_last),
      .jitter_mask(cfg.jitter_mask), .cpi_pulses(cfg.cpi_pulses), .pulse_len,
      .prt(prt_k), .prt_start, .cpi(cpi_k), .pri_idx(pri_idx_k), .period(period_k));

    bite_gen u_bite (
      .clk, .rst_n, .prt_start, .bite_en(cfg.bite_en), .range(cfg.bite_range),
      .pulse_len, .doppler_step(cfg.doppler_step), .bite(bite_k), .phase_off(bite_phase));

    assign src = prt_k ? SRC_PRT : (bite_k ? SRC_BITE : SRC_NONE);

    upconversion_unit #(.BASE_LEN(BASE_LEN)) u_up (
      .clk, .rst_n, .src, .cpi(cpi_k), .pw_sel_in(cfg.pw_sel),
      .chirp_down_in(cfg.chirp_down), .ftw, .bite_phase, .pulse_len,
      .pw_sel(pw_sel_k), .if_raw(if_raw_k), .if_out(if_out_k), .src_out);

    assign if_all[k]   = if_out_k;
    assign prt_all[k]  = prt_k;
    assign bite_all[k] = bite_k;

    if (k == 0) begin : g_monitor
      assign if_out  = if_out_k;
      assign if_raw  = if_raw_k;
      assign prt     = prt_k;
      assign bite    = bite_k;
      assign cpi     = cpi_k;
      assign pri_idx = pri_idx_k;
      assign period  = period_k;
      assign pw_sel  = pw_sel_k;

      output_split u_split (
        .clk, .rst_n, .if_in(if_out_k), .src(src_out), .att, .noise_level,
        .radar_signal, .bite_out);
    end
  end

  assign cfg_wr = |wr_all;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_mix <= '0;
    end else begin
      logic signed [MIX_W-1:0] acc;
      acc = '0;
      for (int k = 0; k < NUM_RADARS; k++) acc += MIX_W'(signed'(if_all[k]));
      if_mix <= acc;
    end
  end

endmodule
