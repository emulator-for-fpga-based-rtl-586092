// upconversion_unit: baseband generation and upconversion to the IF.
//
// The DDS gives a complex carrier (cos, sin) at the IF while a cover pulse
// (PRT for the transmit chirp, BITE for the test echo) is active. In step with
// it, the ROM address generator reads the baseband chirp coefficients
// I = cos(phi), Q = sin(phi) of the selected pulse width from the two
// coefficient banks. Two multipliers form cos*I and sin*Q; the add/sub stage
// subtracts them, giving the real chirp cos(wt + phi) at the IF (or adds them
// for a down-chirp), and a band-pass FIR removes out-of-band products.
// For the BITE echo the DDS phase is offset by the doppler phase.
//
// Pulse width and sweep direction are taken at the CPI strobe (rom_select), so
// a CPI uses one waveform; pulse_len tells the timing generator how long the
// cover pulses must be. A source tag (src_e) travels with the samples.
//
// Timing, for a cover pulse level src at clock t: DDS and ROM outputs at t+2,
// products at t+3, if_raw at t+4, filter output if_out at t+5.
// src_out is delayed to match if_out including the filter's group delay, so
// it marks the centre of the filtered pulse.
module upconversion_unit
  import radar_pkg::*;
#(
  parameter int unsigned BASE_LEN = 64,
  parameter real         BW_FRAC  = 0.125,
  parameter int unsigned LUT_AW   = 10,
  parameter int unsigned NTAPS    = 31
) (
  input  logic     clk,
  input  logic     rst_n,
  input  src_e     src,          // active cover pulse
  input  logic     cpi,          // start of CPI strobe
  input  pw_sel_t  pw_sel_in,
  input  logic     chirp_down_in,
  input  phase_t   ftw,
  input  phase_t   bite_phase,
  output time_t    pulse_len,
  output pw_sel_t  pw_sel,       // pulse width in force
  output sample_t  if_raw,       // IF before the filter
  output sample_t  if_out,       // filtered IF, to the DAC
  output src_e     src_out       // tag aligned with if_out
);

  localparam int unsigned AW      = $clog2(BASE_LEN * ((1 << NUM_PW) - 1));
  localparam int unsigned LAT_RAW = 4;
  localparam int unsigned LAT_OUT = LAT_RAW + 1 + (NTAPS - 1) / 2;

  src_e             src_q;
  logic             start;
  logic [AW-1:0]    base, addr;
  logic             rd_en;
  logic             chirp_down;
  sample_t          c_cos, c_sin, k_i, k_q;
  logic             dds_valid, rom_valid;
  logic signed [2*SAMPLE_W-1:0] p_i, p_q;
  src_e             tag [LAT_OUT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q      <= SRC_NONE;
      chirp_down <= 1'b0;
    end else begin
      src_q <= src;
      if (cpi) chirp_down <= chirp_down_in;
    end
  end

  assign start = (src != SRC_NONE) && (src != src_q);

  rom_select #(.BASE_LEN(BASE_LEN), .N_PW(NUM_PW), .AW(AW)) u_sel (
    .clk, .rst_n, .cpi, .pw_sel_in, .pw_sel, .base, .len(pulse_len));

  rom_addr_gen #(.AW(AW)) u_addr (
    .clk, .rst_n, .start, .gate(src != SRC_NONE), .base, .len(pulse_len),
    .addr, .rd_en);

  lfm_rom #(.BASE_LEN(BASE_LEN), .N_PW(NUM_PW), .BW_FRAC(BW_FRAC), .AW(AW)) u_rom (
    .clk, .rst_n, .rd_en, .addr, .i_o(k_i), .q_o(k_q), .valid_o(rom_valid));

  dds #(.LUT_AW(LUT_AW), .OUT_W(SAMPLE_W)) u_dds (
    .clk, .rst_n, .en(src != SRC_NONE), .ftw,
    .phase_off((src == SRC_BITE) ? bite_phase : '0),
    .cos_o(c_cos), .sin_o(c_sin), .valid_o(dds_valid));

  signed_mult #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mult1 (
    .clk, .rst_n, .a(c_cos), .b(k_i), .p(p_i));
  signed_mult #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mult2 (
    .clk, .rst_n, .a(c_sin), .b(k_q), .p(p_q));

  add_sub #(.IN_W(2*SAMPLE_W), .OUT_W(SAMPLE_W), .SHIFT(SAMPLE_W - 1)) u_addsub (
    .clk, .rst_n, .add(chirp_down), .a(p_i), .b(p_q), .y(if_raw));

  bpf_fir #(.NTAPS(NTAPS), .DATA_W(SAMPLE_W), .COEF_W(SAMPLE_W)) u_bpf (
    .clk, .rst_n, .x(if_raw), .y(if_out));

  // source tag delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(LAT_OUT); k++) tag[k] <= SRC_NONE;
    end else begin
      tag[0] <= src;
      for (int k = 1; k < int'(LAT_OUT); k++) tag[k] <= tag[k-1];
    end
  end
  assign src_out = tag[LAT_OUT-1];

  // The DDS and the ROM must deliver each sample pair together.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // nothing to check in reset
    end else begin
      a_aligned: assert (!rom_valid || dds_valid)
        else $error("coefficient without carrier");
    end
  end

endmodule
