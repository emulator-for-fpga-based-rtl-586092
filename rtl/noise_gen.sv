// noise_gen: receiver-noise source for the BITE echo.
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5) steps once
// per clock. The four bytes of its state, read as signed numbers, are summed;
// by the central limit theorem the sum (range -512..+508, standard deviation
// about 147.8) is close to Gaussian. noise_o is registered, one new value per
// clock. The document asks for noise added to the echo and mentions Gaussian
// noise generators; the generator itself is this design's.
module noise_gen #(
  parameter logic [31:0] SEED = 32'h2545_F491   // must not be zero
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic signed [9:0] noise_o
);

  logic [31:0] x, x1, x2, x3;

  always_comb begin
    x1 = x  ^ (x  << 13);
    x2 = x1 ^ (x1 >> 17);
    x3 = x2 ^ (x2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= SEED;
      noise_o <= '0;
    end else begin
      x       <= x3;
      noise_o <= 10'(signed'(x[7:0])) + 10'(signed'(x[15:8]))
               + 10'(signed'(x[23:16])) + 10'(signed'(x[31:24]));
    end
  end

endmodule
