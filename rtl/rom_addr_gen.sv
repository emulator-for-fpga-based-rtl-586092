// rom_addr_gen: address generation for the coefficient banks.
//
// A start strobe begins a new pulse: the generator then issues the addresses
// base, base+1, ..., base+len-1 on consecutive clocks while the cover pulse
// stays high, with rd_en high for each. It stops early when the cover pulse
// falls and never runs past the end of the region; rd_en is low otherwise.
// base and len are taken at the start strobe and held for the whole pulse.
//
// Timing: start/gate at cycle t give the first address at t+1 (registered).
// The document says only that addresses are generated to read the selected
// ROM; the counter is this design's.
module rom_addr_gen
  import radar_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,   // first clock of a cover pulse
  input  logic          gate,    // cover pulse (PRT or BITE) level
  input  logic [AW-1:0] base,
  input  time_t         len,
  output logic [AW-1:0] addr,
  output logic          rd_en
);

  time_t         cnt;       // samples issued in this pulse
  time_t         len_q;
  logic [AW-1:0] base_q;
  time_t         cnt_use;
  time_t         len_use;
  logic [AW-1:0] base_use;

  always_comb begin
    cnt_use  = start ? '0   : cnt;
    len_use  = start ? len  : len_q;
    base_use = start ? base : base_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      len_q  <= '0;
      base_q <= '0;
      addr   <= '0;
      rd_en  <= 1'b0;
    end else begin
      len_q  <= len_use;
      base_q <= base_use;
      if (gate && cnt_use < len_use) begin
        addr  <= base_use + AW'(cnt_use);
        rd_en <= 1'b1;
        cnt   <= cnt_use + 1'b1;
      end else begin
        rd_en <= 1'b0;
        cnt   <= gate ? cnt_use : '0;
      end
    end
  end

endmodule
