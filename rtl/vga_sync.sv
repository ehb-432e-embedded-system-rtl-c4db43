// vga_sync: 640x480 VGA timing generator.
//
// A horizontal counter runs on the 25 MHz pixel enable and wraps after a full
// line of 800 pixel clocks; a vertical counter advances once per line and
// wraps after 521 lines (one 16.7 ms frame). Each sync output comes from a
// set/reset register: it is set when its counter is zero and reset when the
// counter reaches the sync pulse width (96 pixel clocks = 3.84 us for HS,
// 2 lines = 64 us for VS). A line is therefore laid out as
//   sync pulse (96) | back porch (48) | display (640) | front porch (16)
// and a frame as
//   sync pulse (2)  | back porch (29) | display (480) | front porch (10).
// All those numbers are the project report's; the order of the intervals follows
// its counter/zero-detect/pulse-width-detect structure.
//
// Interface: `pix_ce` is the pixel-rate enable. `hcnt`/`vcnt` are the raw
// counters; `px`/`py` are the active-area pixel coordinates, valid while
// `video_on` is high. `line_end` and `frame_start` are one-pixel strobes.
// The set/reset sync registers update on the pixel after the counter value
// that sets/resets them, so `hs`/`vs` lag the counters by one pixel clock;
// the pixel colour path (vga_render) is registered once too, so both arrive
// at the connector aligned. The sync polarity (active low by default, the
// usual 640x480 convention) is this design's choice: the project report does not
// state it.
module vga_sync #(
  parameter int unsigned H_DISP = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_PW   = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_DISP = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_PW   = 2,
  parameter int unsigned V_BP   = 29,
  parameter bit          SYNC_ACTIVE_LOW = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_ce,
  output logic       hs,
  output logic       vs,
  output logic       video_on,
  output logic [9:0] px,
  output logic [9:0] py,
  output logic [9:0] hcnt,
  output logic [9:0] vcnt,
  output logic       line_end,
  output logic       frame_start
);
  localparam int unsigned H_TOTAL = H_PW + H_BP + H_DISP + H_FP;  // 800
  localparam int unsigned V_TOTAL = V_PW + V_BP + V_DISP + V_FP;  // 521
  localparam int unsigned H_START = H_PW + H_BP;                  // 144
  localparam int unsigned V_START = V_PW + V_BP;                  // 31

  logic h_pulse, v_pulse;   // set/reset sync registers, 1 = inside the pulse

  // Horizontal and vertical counters.
  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (pix_ce) begin
      if (hcnt == 10'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 10'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  // Sync registers: zero detect sets, pulse-width detect resets.
  always_ff @(posedge clk) begin
    if (rst) begin
      h_pulse <= 1'b0;
      v_pulse <= 1'b0;
    end else if (pix_ce) begin
      if (hcnt == '0)                h_pulse <= 1'b1;
      else if (hcnt == 10'(H_PW))    h_pulse <= 1'b0;
      if (vcnt == '0)                v_pulse <= 1'b1;
      else if (vcnt == 10'(V_PW))    v_pulse <= 1'b0;
    end
  end

  assign hs = SYNC_ACTIVE_LOW ? ~h_pulse : h_pulse;
  assign vs = SYNC_ACTIVE_LOW ? ~v_pulse : v_pulse;

  assign video_on = (hcnt >= 10'(H_START)) && (hcnt < 10'(H_START + H_DISP)) &&
                    (vcnt >= 10'(V_START)) && (vcnt < 10'(V_START + V_DISP));
  assign px = video_on ? hcnt - 10'(H_START) : '0;
  assign py = video_on ? vcnt - 10'(V_START) : '0;

  assign line_end    = pix_ce && (hcnt == 10'(H_TOTAL - 1));
  assign frame_start = pix_ce && (hcnt == '0) && (vcnt == '0);
endmodule
