// vga_top: 640 x 480 VGA display controller with a cursor overlay, used to
// show the video frame and the tracked position on a monitor.
//
// Two counters walk the 800 x 525 raster of 640 x 480 at 60 Hz (25 MHz pixel
// clock): horizontally 640 visible pixels, 16 front porch, 96 sync, 48 back
// porch; vertically 480 lines, 10 front porch, 2 sync, 33 back porch. Both
// syncs are active low. For every visible pixel the controller publishes its
// coordinates and its frame-buffer address (y * 640 + x); the pixel colour
// that arrives on iRed/iGreen/iBlue in the same clock is registered to the
// DAC outputs together with the syncs and the blanking, so all display
// outputs are aligned one clock after the coordinates.
//
// Cursor: iCursor_RGB_EN[3] turns on a cross-hair (one horizontal and one
// vertical line) through (iCursor_X, iCursor_Y); on those pixels the colour
// channels selected by iCursor_RGB_EN[2:0] (R, G, B) take the cursor colour
// iCursor_R/G/B, the others keep the video colour.
//
// Other outputs: oVGA_CLOCK is the inverted pixel clock for the video DAC
// (data change on its falling edge); oVGA_BLANK is the DAC's active-low blank
// (high during visible pixels); oVGA_SYNC is the DAC's sync-on-green input,
// held low (no sync on green).
//
// Port names and widths are those of the published block symbol and the
// 640 x 480 resolution is the published one; the timing numbers are the
// standard VGA 640 x 480 @ 60 Hz values, and the cursor encoding, the output
// register and the blanking/sync-on-green conventions are this design's choices.
module vga_top #(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33
) (
  input  logic        iCLK_25,
  input  logic        iRST_N,
  input  logic [9:0]  iRed,
  input  logic [9:0]  iGreen,
  input  logic [9:0]  iBlue,
  input  logic [9:0]  iCursor_R,
  input  logic [9:0]  iCursor_G,
  input  logic [9:0]  iCursor_B,
  input  logic [3:0]  iCursor_RGB_EN,
  input  logic [9:0]  iCursor_X,
  input  logic [9:0]  iCursor_Y,
  output logic [19:0] oAddress,
  output logic [9:0]  oCoord_X,
  output logic [9:0]  oCoord_Y,
  output logic [9:0]  oVGA_R,
  output logic [9:0]  oVGA_G,
  output logic [9:0]  oVGA_B,
  output logic        oVGA_BLANK,
  output logic        oVGA_CLOCK,
  output logic        oVGA_H_SYNC,
  output logic        oVGA_SYNC,
  output logic        oVGA_V_SYNC
);

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] h_q;
  logic [9:0]  v_q;
  logic        visible, hs, vs, on_cursor;

  always_ff @(posedge iCLK_25 or negedge iRST_N) begin
    if (!iRST_N) begin
      h_q <= '0;
      v_q <= '0;
    end else if (h_q == 11'(H_TOTAL - 1)) begin
      h_q <= '0;
      v_q <= (v_q == 10'(V_TOTAL - 1)) ? '0 : v_q + 1'b1;
    end else begin
      h_q <= h_q + 1'b1;
    end
  end

  assign visible = (h_q < 11'(H_ACTIVE)) && (v_q < 10'(V_ACTIVE));
  assign hs = !((h_q >= 11'(H_ACTIVE + H_FP)) && (h_q < 11'(H_ACTIVE + H_FP + H_SYNC)));
  assign vs = !((v_q >= 10'(V_ACTIVE + V_FP)) && (v_q < 10'(V_ACTIVE + V_FP + V_SYNC)));
  assign on_cursor = iCursor_RGB_EN[3] &&
                     ((h_q == {1'b0, iCursor_X}) || (v_q == iCursor_Y));

  assign oCoord_X = visible ? h_q[9:0] : '0;
  assign oCoord_Y = visible ? v_q : '0;
  assign oAddress = visible ? 20'(v_q * 20'(H_ACTIVE) + 20'(h_q)) : '0;

  always_ff @(posedge iCLK_25 or negedge iRST_N) begin
    if (!iRST_N) begin
      oVGA_R      <= '0;
      oVGA_G      <= '0;
      oVGA_B      <= '0;
      oVGA_BLANK  <= 1'b0;
      oVGA_H_SYNC <= 1'b1;
      oVGA_V_SYNC <= 1'b1;
    end else begin
      oVGA_H_SYNC <= hs;
      oVGA_V_SYNC <= vs;
      oVGA_BLANK  <= visible;
      if (!visible) begin
        oVGA_R <= '0;
        oVGA_G <= '0;
        oVGA_B <= '0;
      end else begin
        oVGA_R <= (on_cursor && iCursor_RGB_EN[2]) ? iCursor_R : iRed;
        oVGA_G <= (on_cursor && iCursor_RGB_EN[1]) ? iCursor_G : iGreen;
        oVGA_B <= (on_cursor && iCursor_RGB_EN[0]) ? iCursor_B : iBlue;
      end
    end
  end

  assign oVGA_CLOCK = ~iCLK_25;
  assign oVGA_SYNC  = 1'b0;

endmodule
