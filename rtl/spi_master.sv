// spi_master: one-byte, full-duplex SPI shifter for the joystick link.
//
// SPI mode 0: SCLK idles low, the master drives MOSI before the rising edge
// and samples MISO on the rising edge; bits go most significant first. The
// serial clock is built from `half_tick`, a one-cycle enable that marks each
// half period of SCLK (with the board's 50 MHz clock and a 375-cycle divider
// this gives the 66.67 kHz SCLK the joystick link runs at).
//
// Interface: pulse `start` for one cycle while `busy` is low; `tx_byte` is
// captured then. `done` pulses for one cycle when the eighth falling edge has
// been sent, with the received byte on `rx_byte`. Chip select is not handled
// here (jstk_master owns it).
//
// Timing: a byte takes 16 half-ticks after the first half-tick following
// `start`. The project report only names the SPI block and its 66.67 kHz clock; the
// mode, bit order and handshake are this design's choices (mode 0, MSB first
// is what the joystick's controller expects).
module spi_master (
  input  logic       clk,
  input  logic       rst,
  input  logic       half_tick,
  input  logic       start,
  input  logic [7:0] tx_byte,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);
  logic [7:0] tx_sh, rx_sh;
  logic [2:0] bit_cnt;

  assign mosi = tx_sh[7];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      sclk    <= 1'b0;
      tx_sh   <= '0;
      rx_sh   <= '0;
      rx_byte <= '0;
      bit_cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sclk <= 1'b0;
        if (start) begin
          busy    <= 1'b1;
          tx_sh   <= tx_byte;
          bit_cnt <= '0;
        end
      end else if (half_tick) begin
        if (!sclk) begin
          // rising edge: sample MISO
          sclk  <= 1'b1;
          rx_sh <= {rx_sh[6:0], miso};
        end else begin
          // falling edge: present the next bit or finish
          sclk <= 1'b0;
          if (bit_cnt == 3'd7) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            rx_byte <= rx_sh;
          end else begin
            bit_cnt <= bit_cnt + 1'b1;
            tx_sh   <= {tx_sh[6:0], 1'b0};
          end
        end
      end
    end
  end

  // start is only honoured while idle
  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("spi_master: start while busy");
endmodule
