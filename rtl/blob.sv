// blob: WIDTH x HEIGHT rectangle sprite whose top-left corner is at (x, y).
// pixel is COLOR while (hcount, vcount) is inside it, else 0. Combinational.
module blob #(
  parameter int         WIDTH  = 16,
  parameter int         HEIGHT = 16,
  parameter logic [2:0] COLOR  = 3'b111
) (
  input  logic [10:0] x,
  input  logic [10:0] hcount,
  input  logic [9:0]  y,
  input  logic [9:0]  vcount,
  output logic [2:0]  pixel
);

  always_comb begin
    if (hcount >= x && {1'b0, hcount} < {1'b0, x} + 12'(WIDTH) &&
        vcount >= y && {1'b0, vcount} < {1'b0, y} + 11'(HEIGHT))
      pixel = COLOR;
    else
      pixel = 3'b000;
  end

endmodule
