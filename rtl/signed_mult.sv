// signed_mult: registered signed multiplier, one of the two multipliers of the
// upconversion unit (carrier cos x cosine coefficient, carrier sin x sine
// coefficient). Full-precision product, latency one clock.
module signed_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [A_W+B_W-1:0]   p
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else        p <= a * b;
  end

endmodule
