// xvga: display timing for 1024 x 768 at 60 Hz from a 65 MHz pixel clock.
//
// hcount runs 0..1343 per line and vcount 0..805 per frame. Pixels
// 0..1023 of lines 0..767 are visible; blank is high elsewhere. hsync is
// low (active) for pixels 1048..1183 and vsync for lines 777..782. All
// outputs are registered and aligned with each other.
module xvga (
  input  logic        vclock,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);

  localparam int H_ACTIVE = 1024, H_SYNC_ON = 1047, H_SYNC_OFF = 1183, H_TOTAL = 1344;
  localparam int V_ACTIVE = 768,  V_SYNC_ON = 776,  V_SYNC_OFF = 782,  V_TOTAL = 806;

  logic hblank, vblank;
  logic hreset, vreset, hblankon, vblankon;
  logic next_hblank, next_vblank;

  assign hblankon    = (hcount == 11'(H_ACTIVE - 1));
  assign hreset      = (hcount == 11'(H_TOTAL - 1));
  assign vblankon    = hreset && (vcount == 10'(V_ACTIVE - 1));
  assign vreset      = hreset && (vcount == 10'(V_TOTAL - 1));
  assign next_hblank = hreset ? 1'b0 : hblankon ? 1'b1 : hblank;
  assign next_vblank = vreset ? 1'b0 : vblankon ? 1'b1 : vblank;

  always_ff @(posedge vclock) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
      hblank <= 1'b0;
      vblank <= 1'b0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= hreset ? '0 : hcount + 1'b1;
      hblank <= next_hblank;
      hsync  <= (hcount == 11'(H_SYNC_ON)) ? 1'b0 :
                (hcount == 11'(H_SYNC_OFF)) ? 1'b1 : hsync;
      vcount <= hreset ? (vreset ? '0 : vcount + 1'b1) : vcount;
      vblank <= next_vblank;
      vsync  <= (hreset && vcount == 10'(V_SYNC_ON)) ? 1'b0 :
                (hreset && vcount == 10'(V_SYNC_OFF)) ? 1'b1 : vsync;
      blank  <= next_vblank || (next_hblank && !hreset);
    end
  end

endmodule
