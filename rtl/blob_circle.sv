// blob_circle: ring sprite centred on (x, y).
//
// A pixel belongs to the ring when its squared distance d2 from the centre
// satisfies RADIUS^2 - THICKNESS < d2 < RADIUS^2 (THICKNESS is measured in
// squared-distance units; a value of RADIUS^2 fills the disc).
//
// Timing: two pipeline stages (absolute offsets, then squares and compare);
// pixel belongs to the hcount/vcount presented two clocks earlier.
module blob_circle #(
  parameter int         RADIUS    = 160,
  parameter int         THICKNESS = 800,
  parameter logic [2:0] COLOR     = 3'b001
) (
  input  logic        vclock,
  input  logic [10:0] x,
  input  logic [10:0] hcount,
  input  logic [9:0]  y,
  input  logic [9:0]  vcount,
  output logic [2:0]  pixel
);

  localparam int R2 = RADIUS * RADIUS;

  logic [10:0] x_offset;
  logic [9:0]  y_offset;
  logic [22:0] d2;

  always_ff @(posedge vclock) begin
    x_offset <= (hcount > x) ? hcount - x : x - hcount;
    y_offset <= (vcount > y) ? vcount - y : y - vcount;
    d2       <= 23'(x_offset * x_offset) + 23'(y_offset * y_offset);
  end

  assign pixel = (d2 < 23'(R2) && d2 > 23'(R2 - THICKNESS)) ? COLOR : 3'b000;

endmodule
