// tracker_top: the tracking-by-detection hardware. The detector/classifier
// path compares a template with each new search patch through the Gaussian
// kernel (FFT-based correlation and CORDIC exponential), finds the peak of the
// response, moves the tracked position by the peak's offset and shows that
// position as a cursor on the VGA output. The units the system also offers
// as separate blocks, the sine/cosine CORDIC and the 2-D FFT, sit beside this
// path with their own ports; their operands and the control inputs come from
// the host processor, which is outside this RTL.
//
// Tracking step: a template x and a patch z (N = 2^LOG2N samples each, taken
// along the horizontal line through the current position) stream into
// gauss_kernel. The peak lag n of the response k[n] is the shift of the
// object between template and patch, read cyclically: n < N/2 moves right by
// n, otherwise left by N - n. The position register (loaded by pos_load)
// moves by that amount, clamped to the visible 0..639 range, and drives the
// cursor's X; the cursor's Y comes from cursor_y.
//
// Interface groups:
//   clk / rst_n        one clock for everything (the 25 MHz pixel clock)
//   feat_*, inv_sigma2 template/patch streams and 1/sigma^2 (see gauss_kernel)
//   pos_*, track_*     position load, tracking result per patch
//   vga_* / cursor_*   video in, VGA DAC outputs, frame-buffer address
//   cs_*               sine/cosine CORDIC (combinational)
//   f2_*               2-D FFT unit (see fft2d)
// Timing: one tracking step takes about 4N clocks after the patch is loaded;
// track_valid pulses when the new position is in pos_x, and the cursor moves
// from the next pixel on.
//
// The blocks are the published ones; their connection into a single system
// (one clock, a 1-D horizontal search, position update and cursor display)
// is this design's choice, as the published system-level wiring is not given.
module tracker_top #(
  parameter int LOG2N  = 6,    // kernel / search length N
  parameter int F2_LOG2R = 6,  // 2-D FFT rows
  parameter int F2_LOG2C = 6   // 2-D FFT columns
) (
  input  logic        clk,
  input  logic        rst_n,
  // classifier input
  input  logic [15:0] inv_sigma2,
  output logic        feat_ready,
  input  logic        feat_valid,
  input  logic signed [7:0] feat_x,
  input  logic signed [7:0] feat_z,
  // position
  input  logic        pos_load,
  input  logic [9:0]  pos_init,
  output logic [9:0]  pos_x,
  output logic        track_valid,
  output logic signed [LOG2N:0] track_shift,
  output logic [15:0] track_score,
  // display
  input  logic [9:0]  vga_red,
  input  logic [9:0]  vga_green,
  input  logic [9:0]  vga_blue,
  input  logic [9:0]  cursor_r,
  input  logic [9:0]  cursor_g,
  input  logic [9:0]  cursor_b,
  input  logic [3:0]  cursor_rgb_en,
  input  logic [9:0]  cursor_y,
  output logic [19:0] vga_address,
  output logic [9:0]  vga_coord_x,
  output logic [9:0]  vga_coord_y,
  output logic [9:0]  vga_r,
  output logic [9:0]  vga_g,
  output logic [9:0]  vga_b,
  output logic        vga_blank,
  output logic        vga_clock,
  output logic        vga_hsync,
  output logic        vga_sync,
  output logic        vga_vsync,
  // sine/cosine CORDIC
  input  logic signed [15:0] cs_angle,
  input  logic        cs_reset,
  output logic signed [15:0] cs_cos,
  output logic signed [15:0] cs_sin,
  // 2-D FFT
  input  logic        f2_inverse,
  output logic        f2_in_ready,
  input  logic        f2_in_valid,
  input  logic signed [7:0] f2_in_re,
  input  logic signed [7:0] f2_in_im,
  output logic        f2_out_valid,
  output logic        f2_out_last,
  output logic [F2_LOG2R-1:0] f2_out_row,
  output logic [F2_LOG2C-1:0] f2_out_col,
  output logic signed [8+F2_LOG2C+1+((F2_LOG2R > F2_LOG2C) ? F2_LOG2R : F2_LOG2C):0] f2_out_re,
  output logic signed [8+F2_LOG2C+1+((F2_LOG2R > F2_LOG2C) ? F2_LOG2R : F2_LOG2C):0] f2_out_im
);

  localparam int N = 1 << LOG2N;

  // ---------------- classifier: kernel response and its peak ----------------
  logic             k_valid, k_last;
  logic [LOG2N-1:0] k_index;
  logic [15:0]      k_value;
  logic             pk_valid;
  logic [LOG2N-1:0] pk_index;
  logic [15:0]      pk_value;

  gauss_kernel #(.LOG2N(LOG2N)) u_kernel (
    .clk, .rst_n, .inv_sigma2,
    .in_ready(feat_ready), .in_valid(feat_valid), .in_x(feat_x), .in_z(feat_z),
    .k_valid, .k_last, .k_index, .k_value
  );

  peak_detect #(.VW(16), .XW(LOG2N)) u_peak (
    .clk, .rst_n,
    .in_valid(k_valid), .in_last(k_last), .in_value(k_value), .in_index(k_index),
    .peak_valid(pk_valid), .peak_index(pk_index), .peak_value(pk_value)
  );

  // ---------------- position update ----------------
  logic signed [LOG2N:0] shift;
  logic signed [11:0]    next_x;

  assign shift  = (pk_index < LOG2N'(N / 2)) ? $signed({1'b0, pk_index})
                                             : $signed({1'b0, pk_index}) - (LOG2N+1)'(N);
  assign next_x = $signed({2'b00, pos_x}) + 12'(shift);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_x       <= '0;
      track_valid <= 1'b0;
      track_shift <= '0;
      track_score <= '0;
    end else begin
      track_valid <= 1'b0;
      if (pos_load) begin
        pos_x <= pos_init;
      end else if (pk_valid) begin
        if (next_x < 0)             pos_x <= '0;
        else if (next_x > 12'sd639) pos_x <= 10'd639;
        else                        pos_x <= next_x[9:0];
        track_valid <= 1'b1;
        track_shift <= shift;
        track_score <= pk_value;
      end
    end
  end

  // ---------------- display ----------------
  vga_top u_vga (
    .iCLK_25(clk), .iRST_N(rst_n),
    .iRed(vga_red), .iGreen(vga_green), .iBlue(vga_blue),
    .iCursor_R(cursor_r), .iCursor_G(cursor_g), .iCursor_B(cursor_b),
    .iCursor_RGB_EN(cursor_rgb_en), .iCursor_X(pos_x), .iCursor_Y(cursor_y),
    .oAddress(vga_address), .oCoord_X(vga_coord_x), .oCoord_Y(vga_coord_y),
    .oVGA_R(vga_r), .oVGA_G(vga_g), .oVGA_B(vga_b),
    .oVGA_BLANK(vga_blank), .oVGA_CLOCK(vga_clock), .oVGA_H_SYNC(vga_hsync),
    .oVGA_SYNC(vga_sync), .oVGA_V_SYNC(vga_vsync)
  );

  // ---------------- stand-alone units ----------------
  cordic_sincos u_sincos (
    .angle(cs_angle), .reset(cs_reset), .x(cs_cos), .y(cs_sin)
  );

  fft2d #(.LOG2R(F2_LOG2R), .LOG2C(F2_LOG2C)) u_fft2d (
    .clk, .rst_n, .inverse(f2_inverse),
    .in_ready(f2_in_ready), .in_valid(f2_in_valid), .in_re(f2_in_re), .in_im(f2_in_im),
    .out_valid(f2_out_valid), .out_last(f2_out_last),
    .out_row(f2_out_row), .out_col(f2_out_col), .out_re(f2_out_re), .out_im(f2_out_im)
  );

endmodule
