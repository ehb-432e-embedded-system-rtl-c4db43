// sevenseg_driver: shows a 16-bit value on the board's 4-digit display.
//
// The four digits share their segment lines, so they are lit one at a time:
// every REFRESH_CYCLES clock cycles (50,000 = 1 ms at 50 MHz, so the whole
// display refreshes at 250 Hz, well above visible flicker) the next anode is
// selected and its 4-bit nibble is decoded to segments (hexadecimal glyphs;
// a BCD score shows as decimal). Digit 0, the rightmost (AN0), shows
// value[3:0]. Anodes and segments are active low, as the display's drive
// transistors and common-anode LEDs need; seg[0] is segment A ... seg[6] is
// segment G; the decimal point is kept off. The display and its pins are the
// document's; the refresh rate is this design's choice.
module sevenseg_driver #(
  parameter int unsigned REFRESH_CYCLES = 50_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] value,
  output logic [3:0]  an,
  output logic [6:0]  seg,
  output logic        dp
);
  localparam int unsigned RW = (REFRESH_CYCLES > 1) ? $clog2(REFRESH_CYCLES) : 1;

  logic [RW-1:0] cnt;
  logic [1:0]    digit;
  logic [3:0]    nib;
  logic [6:0]    seg_on;   // active-high segments {G,F,E,D,C,B,A}

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      digit <= '0;
    end else if (cnt == RW'(REFRESH_CYCLES - 1)) begin
      cnt   <= '0;
      digit <= digit + 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign nib = value[4*digit +: 4];

  always_comb begin
    unique case (nib)
      4'h0: seg_on = 7'b0111111;
      4'h1: seg_on = 7'b0000110;
      4'h2: seg_on = 7'b1011011;
      4'h3: seg_on = 7'b1001111;
      4'h4: seg_on = 7'b1100110;
      4'h5: seg_on = 7'b1101101;
      4'h6: seg_on = 7'b1111101;
      4'h7: seg_on = 7'b0000111;
      4'h8: seg_on = 7'b1111111;
      4'h9: seg_on = 7'b1101111;
      4'hA: seg_on = 7'b1110111;
      4'hB: seg_on = 7'b1111100;
      4'hC: seg_on = 7'b0111001;
      4'hD: seg_on = 7'b1011110;
      4'hE: seg_on = 7'b1111001;
      default: seg_on = 7'b1110001;  // F
    endcase
  end

  assign seg = ~seg_on;
  assign an  = ~(4'b0001 << digit);
  assign dp  = 1'b1;
endmodule
