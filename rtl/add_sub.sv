// add_sub: combines the two multiplier outputs into the real IF signal.
//
// With the carrier cos(wt), sin(wt) and the coefficients I = cos(phi),
// Q = sin(phi), subtracting gives cos(wt)I - sin(wt)Q = cos(wt + phi): the
// chirp moved up to the IF with its sweep direction kept (the up-chirp the
// document forms by subtraction). Adding gives cos(wt - phi), the mirrored
// sweep, i.e. a down-chirp, so the add/sub control selects the sweep
// direction. The sum is scaled down by SHIFT bits (arithmetic, rounding toward
// minus infinity) and saturated to OUT_W bits. Latency one clock.
module add_sub #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned SHIFT = 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     add,   // 1: a + b, 0: a - b
  input  logic signed [IN_W-1:0]   a,
  input  logic signed [IN_W-1:0]   b,
  output logic signed [OUT_W-1:0]  y
);

  localparam logic signed [IN_W:0] MAXV = (IN_W+1)'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [IN_W:0] MINV = -(IN_W+1)'(64'sd1 <<< (OUT_W - 1));

  logic signed [IN_W:0] s, sh;

  always_comb begin
    s  = add ? (IN_W+1)'(a) + (IN_W+1)'(b) : (IN_W+1)'(a) - (IN_W+1)'(b);
    sh = s >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          y <= '0;
    else if (sh > MAXV)  y <= MAXV[OUT_W-1:0];
    else if (sh < MINV)  y <= MINV[OUT_W-1:0];
    else                 y <= sh[OUT_W-1:0];
  end

endmodule
