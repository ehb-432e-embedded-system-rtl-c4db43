// jstk_master: polls the PmodJSTK joystick over SPI.
//
// Every POLL_CYCLES clock cycles (10,000,000 at 50 MHz = the project report's 5 Hz
// exchange rate) it pulls the chip select low, waits GAP_HALF half periods of
// SCLK, and exchanges five bytes through spi_master with a gap of GAP_HALF
// half periods after each byte, then raises chip select again. The first
// byte sent carries the command that sets the joystick's two LEDs
// (8'b1000_00,led[1:0]); the rest are zero. The five bytes received are
//   X[7:0], {6'b0, X[9:8]}, Y[7:0], {6'b0, Y[9:8]}, {5'b0, btn[2:0]}
// giving the two 10-bit axis positions (0..1023) the project report describes and
// the three buttons (bit 0 = stick push, bit 1 = BTN1, bit 2 = BTN2).
//
// The byte layout, the LED command and the gaps come from the joystick
// module's own protocol, not from the project report, which only says that data is
// sent to and received from the module at 5 Hz. The gaps are counted in SCLK
// half-period ticks that run freely, so the first one may be cut short: three
// of them give at least 2 x 7.5 us = 15 us at 66.67 kHz, which covers the
// module's need for 15 us after SS falls and 10 us between bytes.
//
// Outputs hold the last complete sample; `valid` pulses for one cycle when a
// new one is latched. `ss_n` is active low.
module jstk_master #(
  parameter int unsigned POLL_CYCLES = 10_000_000,
  parameter int unsigned GAP_HALF    = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       half_tick,   // SCLK half-period enable
  input  logic [1:0] led,         // joystick module LEDs to set
  output logic       ss_n,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic [2:0] btn,
  output logic       valid
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_START, S_XFER, S_GAP} st_t;

  localparam int unsigned PW = (POLL_CYCLES > 1) ? $clog2(POLL_CYCLES) : 1;

  st_t         st;
  logic [PW-1:0] poll_cnt;
  logic [2:0]  byte_idx;
  logic [3:0]  gap_cnt;
  logic [7:0]  rx_b [5];
  logic        spi_start, spi_busy, spi_done;
  logic [7:0]  spi_tx, spi_rx;

  assign spi_tx = (byte_idx == 3'd0) ? {6'b100000, led} : 8'h00;

  spi_master u_spi (
    .clk, .rst, .half_tick,
    .start   (spi_start),
    .tx_byte (spi_tx),
    .busy    (spi_busy),
    .done    (spi_done),
    .rx_byte (spi_rx),
    .sclk, .mosi, .miso
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      poll_cnt  <= '0;
      byte_idx  <= '0;
      gap_cnt   <= '0;
      ss_n      <= 1'b1;
      spi_start <= 1'b0;
      valid     <= 1'b0;
      x         <= '0;
      y         <= '0;
      btn       <= '0;
      for (int i = 0; i < 5; i++) rx_b[i] <= '0;
    end else begin
      spi_start <= 1'b0;
      valid     <= 1'b0;
      poll_cnt  <= (poll_cnt == PW'(POLL_CYCLES - 1)) ? '0 : poll_cnt + 1'b1;
      unique case (st)
        S_IDLE: if (poll_cnt == PW'(POLL_CYCLES - 1)) begin
          ss_n     <= 1'b0;
          byte_idx <= '0;
          gap_cnt  <= '0;
          st       <= S_SETUP;
        end
        S_SETUP: if (half_tick) begin
          if (gap_cnt == 4'(GAP_HALF - 1)) begin
            gap_cnt   <= '0;
            spi_start <= 1'b1;
            st        <= S_START;
          end else gap_cnt <= gap_cnt + 1'b1;
        end
        S_START: st <= S_XFER;   // spi_master has seen start
        S_XFER: if (spi_done) begin
          rx_b[byte_idx] <= spi_rx;
          st             <= S_GAP;
        end
        S_GAP: if (half_tick) begin
          if (gap_cnt == 4'(GAP_HALF - 1)) begin
            gap_cnt <= '0;
            if (byte_idx == 3'd4) begin
              ss_n  <= 1'b1;
              x     <= {rx_b[1][1:0], rx_b[0]};
              y     <= {rx_b[3][1:0], rx_b[2]};
              btn   <= rx_b[4][2:0];
              valid <= 1'b1;
              st    <= S_IDLE;
            end else begin
              byte_idx  <= byte_idx + 1'b1;
              spi_start <= 1'b1;
              st        <= S_START;
            end
          end else gap_cnt <= gap_cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial assert (GAP_HALF >= 1 && GAP_HALF <= 16) else $error("jstk_master: GAP_HALF out of range");
endmodule
