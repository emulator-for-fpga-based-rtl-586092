// bpf_fir: band-pass FIR filter that removes the out-of-band products of the
// upconversion before the signal leaves the FPGA.
//
// NTAPS-tap direct-form FIR. The taps are a Hamming-windowed ideal band pass
// from F_LO to F_HI (in cycles per sample), computed at elaboration and
// quantised to COEF_W bits with 2^(COEF_W-2) standing for 1.0, after scaling so
// that the gain at F_CTR is one. The accumulator is scaled back by COEF_W-2 bits
// and saturated to DATA_W bits.
//
// Timing: one sample per clock; the input of cycle t is in the output of t+1.
// The group delay is (NTAPS-1)/2 samples. The document only says that a band
// pass filter removes the out-of-band components; tap count, band edges and
// widths are this design's (band chosen around the 40 MHz IF at a 160 MHz clock).
module bpf_fir #(
  parameter int unsigned NTAPS  = 31,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter real         F_LO   = 0.15,
  parameter real         F_HI   = 0.35,
  parameter real         F_CTR  = 0.25
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic signed [DATA_W-1:0]  x,
  output logic signed [DATA_W-1:0]  y
);

  localparam int unsigned ACC_W = DATA_W + COEF_W + $clog2(NTAPS) + 1;
  localparam int unsigned FRAC  = COEF_W - 2;
  typedef logic signed [COEF_W-1:0] coef_arr_t [NTAPS];

  function automatic real ideal_tap(input int n);
    real m, pi, h, w;
    pi = 3.14159265358979;
    m  = n - (NTAPS - 1) / 2.0;
    if (m == 0.0) h = 2.0 * (F_HI - F_LO);
    else          h = ($sin(2.0 * pi * F_HI * m) - $sin(2.0 * pi * F_LO * m)) / (pi * m);
    w = 0.54 - 0.46 * $cos(2.0 * pi * n / (NTAPS - 1));
    return h * w;
  endfunction

  function automatic coef_arr_t make_taps();
    coef_arr_t r;
    real g, sc;
    g = 0.0;
    for (int n = 0; n < int'(NTAPS); n++)
      g += ideal_tap(n) * $cos(2.0 * 3.14159265358979 * F_CTR * (n - (NTAPS - 1) / 2.0));
    sc = real'(64'sd1 <<< FRAC) / g;
    for (int n = 0; n < int'(NTAPS); n++)
      r[n] = COEF_W'($rtoi($floor(ideal_tap(n) * sc + 0.5)));
    return r;
  endfunction

  localparam coef_arr_t H = make_taps();

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((64'sd1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(64'sd1 <<< (DATA_W - 1));

  logic signed [DATA_W-1:0] xs [NTAPS-1];  // xs[k] holds x delayed by k+1
  logic signed [ACC_W-1:0]  acc, sh;

  always_comb begin
    acc = ACC_W'(H[0]) * ACC_W'(x);
    for (int k = 1; k < int'(NTAPS); k++)
      acc += ACC_W'(H[k]) * ACC_W'(xs[k-1]);
    sh = acc >>> FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAPS) - 1; k++) xs[k] <= '0;
      y <= '0;
    end else begin
      xs[0] <= x;
      for (int k = 1; k < int'(NTAPS) - 1; k++) xs[k] <= xs[k-1];
      if (sh > MAXV)      y <= MAXV[DATA_W-1:0];
      else if (sh < MINV) y <= MINV[DATA_W-1:0];
      else                y <= sh[DATA_W-1:0];
    end
  end

endmodule
