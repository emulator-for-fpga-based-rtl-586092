// output_split: splits the filtered IF stream into the two outputs of the
// emulator, RADAR_signal (the transmit chirp) and BITE_out (the test echo).
//
// The waveform chain is shared in time between the PRT and BITE cover pulses;
// a source tag travels with each sample. Samples tagged PRT go to radar_signal,
// which is zero otherwise. Samples tagged BITE are attenuated by an arithmetic
// right shift of att bits (0..7), and receiver noise from noise_gen, scaled by
// noise_level (0: none, 1: /4, 2: /2, 3: full), is added at all times, so the
// echo sits in a noise floor; the sum saturates to the sample width.
// Both outputs are registered (latency one clock).
// Attenuation and noise set by switches are from the document; the shift
// attenuator and the noise scaling are this design's.
module output_split
  import radar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sample_t     if_in,
  input  src_e        src,
  input  logic [2:0]  att,
  input  logic [1:0]  noise_level,
  output sample_t     radar_signal,
  output sample_t     bite_out
);

  localparam logic signed [SAMPLE_W:0] MAXV = (SAMPLE_W+1)'((1 <<< (SAMPLE_W - 1)) - 1);
  localparam logic signed [SAMPLE_W:0] MINV = -(SAMPLE_W+1)'(1 <<< (SAMPLE_W - 1));

  logic signed [9:0]        noise;
  logic signed [SAMPLE_W:0] echo, nz, sum;

  noise_gen u_noise (.clk, .rst_n, .noise_o(noise));

  always_comb begin
    echo = (src == SRC_BITE) ? (SAMPLE_W+1)'(if_in >>> att) : '0;
    unique case (noise_level)
      2'd0:    nz = '0;
      2'd1:    nz = (SAMPLE_W+1)'(noise >>> 2);
      2'd2:    nz = (SAMPLE_W+1)'(noise >>> 1);
      default: nz = (SAMPLE_W+1)'(noise);
    endcase
    sum = echo + nz;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      radar_signal <= '0;
      bite_out     <= '0;
    end else begin
      radar_signal <= (src == SRC_PRT) ? if_in : '0;
      if (sum > MAXV)      bite_out <= MAXV[SAMPLE_W-1:0];
      else if (sum < MINV) bite_out <= MINV[SAMPLE_W-1:0];
      else                 bite_out <= sum[SAMPLE_W-1:0];
    end
  end

endmodule
