// lfm_rom: the two coefficient banks (cosine and sine) of the baseband
// linear-FM chirp, one region per selectable pulse width.
//
// Region k holds N_k = BASE_LEN * 2^k samples of I(n) = cos(phi(n)) and
// Q(n) = sin(phi(n)), with phi(n) = pi * BW_FRAC * (n - N_k/2)^2 / N_k. The
// instantaneous frequency BW_FRAC * (n - N_k/2) / N_k (in cycles per sample)
// sweeps linearly from -B/2 to +B/2 over the pulse, B = BW_FRAC * f_clk: the
// document's LFM up-chirp, f(t) = f0 + mu*t for -tau/2 <= t <= tau/2, at
// baseband. Regions are stored back to back from address 0 (region k starts
// at BASE_LEN * (2^k - 1)). The contents are computed at elaboration, the
// equivalent of the offline computation the document describes.
//
// Timing: synchronous read; addr/rd_en at cycle t give i_o/q_o/valid_o at t+1.
// Outputs are zero when rd_en was low. Pulse lengths, bandwidth and widths are
// this design's choices; the document gives none.
module lfm_rom
  import radar_pkg::*;
#(
  parameter int unsigned BASE_LEN = 64,     // samples in the shortest pulse
  parameter int unsigned N_PW     = NUM_PW, // number of pulse widths
  parameter real         BW_FRAC  = 0.125,  // chirp bandwidth / sample rate
  parameter int unsigned AW       = $clog2(BASE_LEN * ((1 << N_PW) - 1))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] addr,
  output sample_t       i_o,
  output sample_t       q_o,
  output logic          valid_o
);

  localparam int unsigned DEPTH = BASE_LEN * ((1 << N_PW) - 1);
  typedef sample_t rom_t [DEPTH];

  function automatic rom_t make_bank(input bit want_sin);
    rom_t r;
    int   a;
    real  amp, nn, ph;
    amp = real'((64'sd1 <<< (SAMPLE_W - 1)) - 1);
    a = 0;
    for (int k = 0; k < int'(N_PW); k++) begin
      nn = real'(BASE_LEN << k);
      for (int n = 0; n < int'(BASE_LEN << k); n++) begin
        ph = 3.14159265358979 * BW_FRAC * (n - nn / 2.0) * (n - nn / 2.0) / nn;
        r[a] = SAMPLE_W'($rtoi($floor(amp * (want_sin ? $sin(ph) : $cos(ph)) + 0.5)));
        a++;
      end
    end
    return r;
  endfunction

  localparam rom_t COS_BANK = make_bank(1'b0);
  localparam rom_t SIN_BANK = make_bank(1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_o     <= '0;
      q_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      i_o     <= rd_en ? COS_BANK[addr] : '0;
      q_o     <= rd_en ? SIN_BANK[addr] : '0;
      valid_o <= rd_en;
    end
  end

endmodule
