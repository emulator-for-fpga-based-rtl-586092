// dds: direct digital synthesizer giving the complex IF carrier (cos and sin).
//
// A phase generator (PHASE_W-bit accumulator, advanced by the frequency tuning
// word FTW every clock) drives a sine/cosine lookup table of 2^LUT_AW entries
// covering one full turn; cosine is read a quarter turn ahead of sine. A phase
// offset (used for the doppler of the BITE echo) is added before the lookup.
// Output frequency = FTW / 2^PHASE_W * f_clk.
//
// The accumulator runs freely so that the carrier stays phase coherent from
// pulse to pulse; the enable input (driven by the PRT or BITE cover pulse) only
// gates the outputs, which are zero while disabled.
//
// Timing: en/phase_off sampled at cycle t give cos_o/sin_o/valid_o at t+2.
// The document names the phase generator and the sin/cos table; the table size,
// the widths and the free-running accumulator are this design's choices.
module dds
  import radar_pkg::*;
#(
  parameter int unsigned LUT_AW = 10,        // log2 of table entries per turn
  parameter int unsigned OUT_W  = SAMPLE_W   // output width, signed
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  phase_t                  ftw,
  input  phase_t                  phase_off,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o,
  output logic                    valid_o
);

  localparam int unsigned N = 1 << LUT_AW;
  typedef logic signed [OUT_W-1:0] lut_t [N];

  // sin(2*pi*i/N) scaled to the largest positive output value, rounded.
  function automatic lut_t make_sine();
    lut_t r;
    real amp;
    amp = real'((64'sd1 <<< (OUT_W - 1)) - 1);
    for (int i = 0; i < int'(N); i++)
      r[i] = OUT_W'($rtoi($floor(amp * $sin(2.0 * 3.14159265358979 * i / N) + 0.5)));
    return r;
  endfunction

  localparam lut_t SINE = make_sine();

  phase_t                  acc;
  logic [LUT_AW-1:0]       ph_top;    // table index: top bits of the phase
  logic [LUT_AW-1:0]       idx_s, idx_c;
  logic                    en_q;

  assign ph_top = LUT_AW'((acc + phase_off) >> (PHASE_W - LUT_AW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      idx_s   <= '0;
      idx_c   <= '0;
      en_q    <= 1'b0;
      cos_o   <= '0;
      sin_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      acc     <= acc + ftw;
      idx_s   <= ph_top;
      idx_c   <= ph_top + LUT_AW'(N / 4);
      en_q    <= en;
      cos_o   <= en_q ? SINE[idx_c] : '0;
      sin_o   <= en_q ? SINE[idx_s] : '0;
      valid_o <= en_q;
    end
  end

endmodule
