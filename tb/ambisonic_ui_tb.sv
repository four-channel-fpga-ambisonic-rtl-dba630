// ambisonic_ui_tb: drives the display with the xvga timing generator and
// compares every visible pixel of several frames with a reference drawing
// (border, four blobs placed from the published coordinates, ring of radius
// 160 and thickness 800 in squared pixels around the map centre), taking the
// two-clock pixel pipeline into account. The sync and blank outputs must be
// the inputs delayed by exactly two clocks. Sources 0, 1 and 2 are moved right,
// down and left with the buttons, and the blobs must follow one frame later.
module ambisonic_ui_tb;
  import ambi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset = 1'b1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;
  logic [3:0] preset_btn = '0;
  logic [NUM_SRC-1:0] src_sel = '0;
  logic up = 1'b0, down = 1'b0, left = 1'b0, right = 1'b0;
  logic phsync, pvsync, pblank;
  logic [2:0] pixel;
  logic [1:0] active_preset;
  coord_t [NUM_SRC-1:0] coord;

  xvga u_timing (.vclock(clk), .reset(reset), .hcount(hcount), .vcount(vcount), .hsync(hsync),
                 .vsync(vsync), .blank(blank));

  ambisonic_ui dut (.vclock(clk), .reset(reset), .hcount(hcount), .vcount(vcount), .hsync(hsync),
                    .vsync(vsync), .blank(blank), .preset_btn(preset_btn), .src_sel(src_sel),
                    .up(up), .down(down), .left(left), .right(right), .phsync(phsync),
                    .pvsync(pvsync), .pblank(pblank), .pixel(pixel),
                    .active_preset(active_preset), .coord(coord));

  localparam logic [2:0] COLORS [4] = '{3'b110, 3'b011, 3'b101, 3'b111};
  int pos_x [4], pos_y [4];
  int seen_border = 0, seen_ring = 0, seen_blob [4] = '{0, 0, 0, 0}, frames = 0;
  int moved = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] ref_pixel(int h, int v);
    int dx, dy, d2;
    if (((h == 256 || h == 768) && v >= 128 && v <= 640) ||
        ((v == 128 || v == 640) && h >= 256 && h <= 768)) return 3'b111;
    for (int i = 0; i < 4; i++)
      if (h >= pos_x[i] && h < pos_x[i] + 16 && v >= pos_y[i] && v < pos_y[i] + 16) return COLORS[i];
    dx = h - 512; dy = v - 384; d2 = dx * dx + dy * dy;
    if (d2 < 25600 && d2 > 25600 - 800) return 3'b001;
    return 3'b000;
  endfunction

  initial begin
    int h1, h2, v1, v2;
    logic [1:0] hs_h, vs_h, bl_h;
    logic vs_prev;
    logic [2:0] exp_pix;
    for (int i = 0; i < 4; i++) begin pos_x[i] = 512; pos_y[i] = 384; end
    repeat (4) @(posedge clk);
    reset <= 1'b0;
    h1 = 0; h2 = 0; v1 = 0; v2 = 0; hs_h = '1; vs_h = '1; bl_h = '0; vs_prev = 1'b1;
    while (frames < 11) begin
      @(posedge clk);
      #1;
      if (h2 != 0 || v2 != 0 || frames > 0) begin
        checks++;
        if (phsync !== hs_h[1] || pvsync !== vs_h[1] || pblank !== bl_h[1]) begin
          failures++;
          if (failures < 10) $display("FAIL sync delay at %0d,%0d", h2, v2);
        end
        if (!pblank && frames > 0) begin
          exp_pix = ref_pixel(h2, v2);
          checks++;
          if (pixel !== exp_pix) begin
            failures++;
            if (failures < 10) $display("FAIL pixel at %0d,%0d: %b expected %b", h2, v2, pixel, exp_pix);
          end
          if (exp_pix == 3'b111 && h2 == 256) seen_border++;
          if (exp_pix == 3'b001) seen_ring++;
          for (int i = 0; i < 4; i++)
            if (exp_pix == COLORS[i] && h2 == pos_x[i] && v2 == pos_y[i]) seen_blob[i]++;
        end
      end
      if (vs_prev && !vsync) begin
        // blob positions are taken from the coordinates published now
        for (int i = 0; i < 4; i++) begin
          int nx, ny;
          nx = ((int'(coord[i].x) + 32) << 3) + 256;
          ny = ((int'(coord[i].y) + 32) << 3) + 128;
          if (nx != pos_x[i] || ny != pos_y[i]) moved++;
          pos_x[i] = nx; pos_y[i] = ny;
        end
        frames++;
        // buttons: source 0 right, then source 1 down, then source 2 left
        src_sel <= (frames < 4) ? 4'b0001 : (frames < 6) ? 4'b0010 : 4'b0100;
        right <= (frames >= 1 && frames < 4);
        down <= (frames >= 4 && frames < 6);
        left <= (frames >= 6 && frames < 8);
      end
      vs_prev = vsync;
      h2 = h1; v2 = v1; h1 = int'(hcount); v1 = int'(vcount);
      hs_h = {hs_h[0], hsync}; vs_h = {vs_h[0], vsync}; bl_h = {bl_h[0], blank};
    end
    $display("border lines %0d, ring pixels %0d, blob corners %0d %0d %0d %0d, moves %0d",
             seen_border, seen_ring, seen_blob[0], seen_blob[1], seen_blob[2], seen_blob[3], moved);
    checks++;
    if (seen_border == 0 || seen_ring == 0) begin failures++; $display("FAIL nothing drawn"); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen_blob[i] == 0) begin failures++; $display("FAIL blob %0d never drawn", i); end
    end
    checks++;
    if (moved < 4) begin failures++; $display("FAIL blobs moved only %0d times", moved); end
    checks++;
    if (coord[0].x != 6'sd3 || coord[1].y != 6'sd2 || coord[2].x != -6'sd2 || coord[3].x != 6'sd0) begin
      failures++;
      $display("FAIL final coordinates %0d,%0d %0d,%0d", coord[0].x, coord[0].y, coord[1].x, coord[1].y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
