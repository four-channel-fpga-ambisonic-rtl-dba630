// coord_translate: maps a signed ambisonic coordinate onto the position map.
//
// x and y (-32..31 units) are offset by 32 and scaled by 8, giving unsigned
// pixel offsets 0..504 inside the 512 x 512 map. Combinational.
module coord_translate
  import ambi_pkg::*;
(
  input  coord_t     coord,
  output logic [8:0] x,
  output logic [8:0] y
);

  logic [5:0] xo, yo;

  // Adding 32 to a 6-bit two's complement value is inverting its sign bit.
  assign xo = {~coord.x[5], coord.x[4:0]};   // -32 -> 0, 31 -> 63
  assign yo = {~coord.y[5], coord.y[4:0]};
  assign x  = {xo, 3'b000};
  assign y  = {yo, 3'b000};

endmodule
