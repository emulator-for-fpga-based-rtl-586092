// rom_select: the ROM selection logic. Turns the user's pulse-width choice into
// the start address and length of that pulse width's region in the
// coefficient banks.
//
// A new choice takes effect only at the start of a coherent processing
// interval (the one-clock cpi strobe), so that every pulse of a CPI uses the
// same waveform. At the strobe itself the new choice is already used
// (combinational bypass), so the first pulse of the CPI reads the right region.
// Region k is BASE_LEN * 2^k samples long and starts at BASE_LEN * (2^k - 1),
// matching lfm_rom. After reset region 0 is selected.
module rom_select
  import radar_pkg::*;
#(
  parameter int unsigned BASE_LEN = 64,
  parameter int unsigned N_PW     = NUM_PW,
  parameter int unsigned AW       = $clog2(BASE_LEN * ((1 << N_PW) - 1))
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cpi,        // start of CPI strobe
  input  logic [$clog2(N_PW)-1:0]   pw_sel_in,  // requested pulse width
  output logic [$clog2(N_PW)-1:0]   pw_sel,     // pulse width in force
  output logic [AW-1:0]             base,       // first address of the region
  output time_t                     len         // pulse length in samples
);

  logic [$clog2(N_PW)-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel_q <= '0;
    else if (cpi) sel_q <= pw_sel_in;
  end

  always_comb begin
    pw_sel = cpi ? pw_sel_in : sel_q;
    base   = AW'(BASE_LEN * ((1 << pw_sel) - 1));
    len    = TIME_W'(BASE_LEN << pw_sel);
  end

endmodule
