// tb_vga_top: runs the controller for a bit over two full 640 x 480 frames.
// A reference raster position kept here predicts every output: coordinates
// and address of visible pixels, registered colour (video fed back from the
// coordinates, cursor cross-hair with per-channel enables), blank and both
// syncs. The line period (800 clocks), frame period (420000 clocks) and the
// sync pulse widths (96 clocks, 2 lines) are also measured on the outputs.
module tb_vga_top;
  logic iCLK_25 = 0, iRST_N = 1;
  logic [9:0] iRed, iGreen, iBlue, iCursor_R, iCursor_G, iCursor_B, iCursor_X, iCursor_Y;
  logic [3:0] iCursor_RGB_EN;
  logic [19:0] oAddress;
  logic [9:0] oCoord_X, oCoord_Y, oVGA_R, oVGA_G, oVGA_B;
  logic oVGA_BLANK, oVGA_CLOCK, oVGA_H_SYNC, oVGA_SYNC, oVGA_V_SYNC;

  vga_top dut (.*);

  always #20 iCLK_25 = ~iCLK_25;

  // video source: colour derived from the pixel the controller asks for
  assign iRed   = oCoord_X;
  assign iGreen = oCoord_Y;
  assign iBlue  = oAddress[9:0] ^ 10'h155;

  int checks = 0, failures = 0;
  int cursor_pixels = 0;

  initial begin
    #80000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  int h = 0, v = 0;
  bit vis_d = 0, hs_d = 1, vs_d = 1, cur_d = 0;
  logic [9:0] r_d, g_d, b_d;
  longint cyc = 0, last_hfall = -1, last_vfall = -1, hlow = 0, vlow = 0;
  bit run = 0;

  always @(posedge iCLK_25) begin
    if (run) begin
      bit vis, cur;
      cyc++;
      // registered outputs reflect the previous position
      chk(oVGA_BLANK == vis_d && oVGA_H_SYNC == hs_d && oVGA_V_SYNC == vs_d,
          $sformatf("blank/sync at %0d,%0d", h, v));
      if (vis_d) chk(oVGA_R == r_d && oVGA_G == g_d && oVGA_B == b_d,
                     $sformatf("colour at %0d,%0d", h, v));
      else chk(oVGA_R == 0 && oVGA_G == 0 && oVGA_B == 0, "colour in blanking");
      // combinational outputs reflect the current position
      vis = (h < 640 && v < 480);
      if (vis) chk(oCoord_X == 10'(h) && oCoord_Y == 10'(v) && oAddress == 20'(v * 640 + h),
                   $sformatf("coordinates %0d,%0d", h, v));
      cur = iCursor_RGB_EN[3] && (h == int'(iCursor_X) || v == int'(iCursor_Y));
      if (vis && cur) cursor_pixels++;
      vis_d = vis;
      hs_d  = !(h >= 656 && h < 752);
      vs_d  = !(v >= 490 && v < 492);
      r_d = (cur && iCursor_RGB_EN[2]) ? iCursor_R : iRed;
      g_d = (cur && iCursor_RGB_EN[1]) ? iCursor_G : iGreen;
      b_d = (cur && iCursor_RGB_EN[0]) ? iCursor_B : iBlue;
      h++;
      if (h == 800) begin
        h = 0;
        v = (v == 524) ? 0 : v + 1;
      end
      // measured periods and pulse widths
      if (!oVGA_H_SYNC) hlow++;
      if (!oVGA_V_SYNC) vlow++;
      if (!oVGA_H_SYNC && hlow == 1) begin
        if (last_hfall >= 0) chk(cyc - last_hfall == 800, "line period");
        last_hfall = cyc;
      end
      if (oVGA_H_SYNC && hlow != 0) begin
        chk(hlow == 96, $sformatf("hsync width %0d", hlow));
        hlow = 0;
      end
      if (!oVGA_V_SYNC && vlow == 1) begin
        if (last_vfall >= 0) chk(cyc - last_vfall == 420000, "frame period");
        last_vfall = cyc;
      end
      if (oVGA_V_SYNC && vlow != 0) begin
        chk(vlow == 1600, $sformatf("vsync width %0d", vlow));
        vlow = 0;
      end
    end
  end

  initial begin
    iCursor_R = 10'h3ff; iCursor_G = 10'h000; iCursor_B = 10'h2aa;
    iCursor_X = 10'd100; iCursor_Y = 10'd50;
    iCursor_RGB_EN = 4'b1101;
    #1 iRST_N = 0;
    #100;
    @(negedge iCLK_25);
    iRST_N = 1;
    run = 1;
    repeat (420000) @(negedge iCLK_25);
    iCursor_RGB_EN = 4'b0111;        // cursor off for the second frame
    repeat (440000) @(negedge iCLK_25);
    chk(last_vfall > 420000, "two frames seen");
    chk(cursor_pixels == 640 + 480 - 1, $sformatf("cursor pixels %0d", cursor_pixels));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
