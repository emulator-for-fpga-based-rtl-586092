// uart_rx: serial receiver for the control link from the PC (8 data bits,
// no parity, one stop bit, least significant bit first).
//
// The line is synchronized with two flops. A falling edge starts a frame; the
// start bit is checked half a bit later, and each data bit and the stop bit are
// then sampled one bit time (CLKS_PER_BIT clocks) apart, at mid-bit. A byte
// whose stop bit is high is delivered with a one-clock valid pulse; a low stop
// bit gives a one-clock frame_err pulse instead. The document says only that
// the control logic talks to the PC over a serial port; the frame format and
// the 115200 baud at a 160 MHz clock are this design's.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 1389
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [1:0]    sync;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= IDLE;
      cnt       <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        START: if (cnt == '0) begin
          if (!rx) begin
            state <= DATA;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - CW'(1);
        DATA: if (cnt == '0) begin
          data <= {rx, data[7:1]};
          cnt  <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= STOP;
          bitn <= bitn + 3'd1;
        end else cnt <= cnt - CW'(1);
        STOP: if (cnt == '0) begin
          state     <= IDLE;
          valid     <= rx;
          frame_err <= !rx;
        end else cnt <= cnt - CW'(1);
      endcase
    end
  end

endmodule
