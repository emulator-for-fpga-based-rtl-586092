// param_regs: control logic that takes the parameters the user sets on the PC,
// as received over the serial link, and holds them for the waveform sources.
//
// Command format, one byte at a time: 0xA5 (sync), register address, then four
// data bytes, most significant first. When the fourth data byte arrives the
// 32-bit word is written to the addressed register (one-clock wr_pulse); an
// unknown address writes nothing. A byte other than 0xA5 where a sync is
// expected is skipped. Register map (values in clocks unless stated):
//   0..3  PRI table entries 0..3                       (low TIME_W bits)
//   4     [1:0] pulse width, [3:2] last stagger index, [4] down-chirp,
//         [5] BITE enable, [15:8] PRIs per CPI (0 = 256)
//   5     PRI jitter mask                              (low TIME_W bits)
//   6     BITE range delay                             (low TIME_W bits)
//   7     BITE doppler phase step per PRI (2^32 = one turn)
// BASE_ADDR (a multiple of 8) moves the bank to BASE_ADDR..BASE_ADDR+7, so
// that one serial link can feed the banks of several emulated radars; the
// addresses above are then offsets. Reset values come from the parameters.
// The document says that parameters set
// on the PC are loaded over a serial port into the source modules; the command
// format and register map are this design's.
module param_regs
  import radar_pkg::*;
#(
  parameter int unsigned DEF_PRI        = 16_000,  // 100 us at 160 MHz
  parameter int unsigned DEF_CPI_PULSES = 16,
  parameter int unsigned DEF_RANGE      = 4_000,
  parameter int unsigned DEF_PW_SEL     = 0,
  parameter logic        DEF_BITE_EN    = 1'b1,
  parameter int unsigned BASE_ADDR      = 0        // multiple of 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output radar_cfg_t cfg,
  output logic       wr_pulse
);

  localparam logic [7:0] SYNC = 8'hA5;

  typedef enum logic [2:0] {W_SYNC, W_ADDR, W_D3, W_D2, W_D1, W_D0} cmd_state_e;

  cmd_state_e  st;
  logic [7:0]  addr;
  logic [23:0] word_hi;
  logic [31:0] word;

  localparam logic [4:0] BANK = 5'(BASE_ADDR / 8);

  logic here;

  assign word = {word_hi, rx_data};
  assign here = (addr[7:3] == BANK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= W_SYNC;
      addr             <= '0;
      word_hi          <= '0;
      wr_pulse         <= 1'b0;
      cfg.pri          <= {NUM_PRI{TIME_W'(DEF_PRI)}};
      cfg.stagger_last <= '0;
      cfg.jitter_mask  <= '0;
      cfg.pw_sel       <= pw_sel_t'(DEF_PW_SEL);
      cfg.chirp_down   <= 1'b0;
      cfg.bite_en      <= DEF_BITE_EN;
      cfg.cpi_pulses   <= 8'(DEF_CPI_PULSES);
      cfg.bite_range   <= TIME_W'(DEF_RANGE);
      cfg.doppler_step <= '0;
    end else begin
      wr_pulse <= 1'b0;
      if (rx_valid) begin
        unique case (st)
          W_SYNC: if (rx_data == SYNC) st <= W_ADDR;
          W_ADDR: begin addr <= rx_data; st <= W_D3; end
          W_D3:   begin word_hi[23:16] <= rx_data; st <= W_D2; end
          W_D2:   begin word_hi[15:8]  <= rx_data; st <= W_D1; end
          W_D1:   begin word_hi[7:0]   <= rx_data; st <= W_D0; end
          default: begin
            st <= W_SYNC;
            if (here) begin
              wr_pulse <= 1'b1;
              unique case (addr[2:0])
                3'd0, 3'd1, 3'd2, 3'd3: cfg.pri[addr[1:0]] <= word[TIME_W-1:0];
                3'd4: begin
                  cfg.pw_sel       <= word[$bits(pw_sel_t)-1:0];
                  cfg.stagger_last <= word[3:2];
                  cfg.chirp_down   <= word[4];
                  cfg.bite_en      <= word[5];
                  cfg.cpi_pulses   <= word[15:8];
                end
                3'd5:    cfg.jitter_mask  <= word[TIME_W-1:0];
                3'd6:    cfg.bite_range   <= word[TIME_W-1:0];
                default: cfg.doppler_step <= word;
              endcase
            end
          end
        endcase
      end
    end
  end

endmodule
