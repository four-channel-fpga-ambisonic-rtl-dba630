// ambisonic_ui: position map display and user controls.
//
// Draws, on a 1024 x 768 screen, a 512 x 512 map (white border from
// (256,128) to (768,640)) showing the four virtual sources as 16 x 16
// blobs (yellow, cyan, magenta, white) and a blue ring of radius 160
// pixels (20 coordinate units) centred on the map: the border beyond which
// a source's gain starts to fall off. The preset manager inside it holds the
// source positions; its coordinates are both drawn and published on coord.
//
// Once per frame, at the falling edge of vsync, the preset manager steps
// and the blob positions are re-read, so sprites never tear mid-frame.
// Drawing priority: border, blob 0..3, ring.
//
// Timing: the pixel pipeline is two clocks deep; phsync, pvsync and pblank
// are delayed to match, so all four outputs belong together.
module ambisonic_ui
  import ambi_pkg::*;
(
  input  logic                 vclock,
  input  logic                 reset,
  input  logic [10:0]          hcount,
  input  logic [9:0]           vcount,
  input  logic                 hsync,
  input  logic                 vsync,
  input  logic                 blank,
  input  logic [3:0]           preset_btn,
  input  logic [NUM_SRC-1:0]   src_sel,
  input  logic                 up,
  input  logic                 down,
  input  logic                 left,
  input  logic                 right,
  output logic                 phsync,
  output logic                 pvsync,
  output logic                 pblank,
  output logic [2:0]           pixel,
  output logic [1:0]           active_preset,
  output coord_t [NUM_SRC-1:0] coord
);

  localparam int MAP_X0 = 256, MAP_Y0 = 128, MAP_SIZE = 512;
  localparam logic [2:0] BLOB_COLOR [NUM_SRC] = '{3'b110, 3'b011, 3'b101, 3'b111};

  logic        vsync_delay, draw_screen;
  logic [8:0]  tx [NUM_SRC];
  logic [8:0]  ty [NUM_SRC];
  logic [10:0] bx [NUM_SRC];
  logic [9:0]  by [NUM_SRC];
  logic [2:0]  bpix [NUM_SRC];
  logic [2:0]  ring_pix;
  logic        border;
  logic [2:0]  sprite_d, sprite_q1, sprite_q2;
  logic        border_q1, border_q2;
  logic [1:0]  hs_q, vs_q, bl_q;

  always_ff @(posedge vclock) vsync_delay <= vsync;
  assign draw_screen = vsync_delay && !vsync;

  preset_manager u_presets (
    .clk          (vclock),
    .reset        (reset),
    .update       (draw_screen),
    .preset_btn   (preset_btn),
    .src_sel      (src_sel),
    .up           (up),
    .down         (down),
    .left         (left),
    .right        (right),
    .coord        (coord),
    .active_preset(active_preset)
  );

  for (genvar i = 0; i < NUM_SRC; i++) begin : g_src
    coord_translate u_ct (.coord(coord[i]), .x(tx[i]), .y(ty[i]));

    always_ff @(posedge vclock) begin
      if (reset) begin
        bx[i] <= 11'(MAP_X0 + MAP_SIZE / 2);
        by[i] <= 10'(MAP_Y0 + MAP_SIZE / 2);
      end else if (draw_screen) begin
        bx[i] <= 11'(tx[i]) + 11'(MAP_X0);
        by[i] <= 10'(ty[i]) + 10'(MAP_Y0);
      end
    end

    blob #(.WIDTH(16), .HEIGHT(16), .COLOR(BLOB_COLOR[i])) u_blob (
      .x(bx[i]), .y(by[i]), .hcount(hcount), .vcount(vcount), .pixel(bpix[i])
    );
  end

  blob_circle #(.RADIUS(160), .THICKNESS(800), .COLOR(3'b001)) u_ring (
    .vclock(vclock), .x(11'(MAP_X0 + MAP_SIZE / 2)), .y(10'(MAP_Y0 + MAP_SIZE / 2)),
    .hcount(hcount), .vcount(vcount), .pixel(ring_pix)
  );

  assign border = ((hcount == 11'(MAP_X0) || hcount == 11'(MAP_X0 + MAP_SIZE)) &&
                   vcount >= 10'(MAP_Y0) && vcount <= 10'(MAP_Y0 + MAP_SIZE)) ||
                  ((vcount == 10'(MAP_Y0) || vcount == 10'(MAP_Y0 + MAP_SIZE)) &&
                   hcount >= 11'(MAP_X0) && hcount <= 11'(MAP_X0 + MAP_SIZE));

  always_comb begin
    sprite_d = 3'b000;
    for (int i = NUM_SRC - 1; i >= 0; i--)
      if (bpix[i] != 3'b000) sprite_d = bpix[i];
  end

  always_ff @(posedge vclock) begin
    sprite_q1 <= sprite_d;
    sprite_q2 <= sprite_q1;
    border_q1 <= border;
    border_q2 <= border_q1;
    hs_q      <= {hs_q[0], hsync};
    vs_q      <= {vs_q[0], vsync};
    bl_q      <= {bl_q[0], blank};
  end

  assign pixel  = border_q2 ? 3'b111 : (sprite_q2 != 3'b000) ? sprite_q2 : ring_pix;
  assign phsync = hs_q[1];
  assign pvsync = vs_q[1];
  assign pblank = bl_q[1];

endmodule
