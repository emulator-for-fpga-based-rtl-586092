// clock_control: the clock-and-control block between the board and the
// emulator. It makes a reset that is asserted asynchronously and released in
// step with the clock, and turns the board's control switches into clean
// settings.
//
// Each switch passes a two-flop synchronizer and a debouncer: the stable value
// follows the synchronized input only after it has held for DEBOUNCE clocks.
// The stable switches are decoded as
//   sw[1:0]  IF carrier choice: frequency tuning word IF_KHZ[sw] / CLK_KHZ * 2^32
//   sw[4:2]  BITE attenuation, right shift of 0..7 bits (6 dB steps)
//   sw[6:5]  noise level 0..3
// The document says only that board switches select combinations of frequency
// and attenuation; the coding, the frequencies other than 40 MHz, the 160 MHz
// clock and the debounce time are this design's. Settings are registered.
module clock_control
  import radar_pkg::*;
#(
  parameter int unsigned CLK_KHZ  = 160_000,
  parameter int unsigned IF_KHZ0  = 40_000,
  parameter int unsigned IF_KHZ1  = 38_000,
  parameter int unsigned IF_KHZ2  = 42_000,
  parameter int unsigned IF_KHZ3  = 44_000,
  parameter int unsigned DEBOUNCE = 65_536
) (
  input  logic        clk,
  input  logic        ext_rst_n,   // board reset, asynchronous, active low
  input  logic [6:0]  sw,          // board switches, asynchronous
  output logic        rst_n,       // synchronously released reset
  output phase_t      ftw,
  output logic [2:0]  att,
  output logic [1:0]  noise_level
);

  function automatic phase_t ftw_of(input int unsigned khz);
    return PHASE_W'(((64'(khz) << PHASE_W) + 64'(CLK_KHZ / 2)) / 64'(CLK_KHZ));
  endfunction

  localparam phase_t FTW0 = ftw_of(IF_KHZ0);
  localparam phase_t FTW1 = ftw_of(IF_KHZ1);
  localparam phase_t FTW2 = ftw_of(IF_KHZ2);
  localparam phase_t FTW3 = ftw_of(IF_KHZ3);
  localparam int unsigned CW = $clog2(DEBOUNCE + 1);

  logic [1:0]    rst_sync;
  logic [6:0]    sw_m, sw_s, sw_stable;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) rst_sync <= '0;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_n = rst_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_m        <= '0;
      sw_s        <= '0;
      sw_stable   <= '0;
      cnt         <= '0;
      ftw         <= FTW0;
      att         <= '0;
      noise_level <= '0;
    end else begin
      sw_m <= sw;
      sw_s <= sw_m;
      if (sw_s == sw_stable) begin
        cnt <= '0;
      end else if (cnt >= CW'(DEBOUNCE - 1)) begin
        cnt       <= '0;
        sw_stable <= sw_s;
      end else begin
        cnt <= cnt + CW'(1);
      end
      unique case (sw_stable[1:0])
        2'd0: ftw <= FTW0;
        2'd1: ftw <= FTW1;
        2'd2: ftw <= FTW2;
        default: ftw <= FTW3;
      endcase
      att         <= sw_stable[4:2];
      noise_level <= sw_stable[6:5];
    end
  end

endmodule
