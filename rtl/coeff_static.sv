// coeff_static: decoding coefficients for the fixed loudspeaker positions.
//
// A small ROM holds one 16-harmonic coefficient set for each of NUM_POS
// speaker positions (default: the four corners (31,31), (31,-31), (-31,31),
// (-31,-31) of the coordinate square). The coordinate input selects the
// entry whose {x, y, z} matches; an unknown coordinate selects entry 0.
// Coefficients use the speaker gain of ambi_pkg::static_coef (0.95, no
// distance fall-off). coeffs_valid is always high: the table needs no
// loading time.
//
// Timing: purely combinational lookup of a constant table.
module coeff_static
  import ambi_pkg::*;
#(
  parameter int NUM_POS = 4,
  parameter int POS_X [NUM_POS] = '{31, 31, -31, -31},
  parameter int POS_Y [NUM_POS] = '{31, -31, 31, -31}
) (
  input  coord_t coord,
  output cvec_t  coefs,
  output logic   coeffs_valid
);

  cvec_t table_q [NUM_POS];

  initial begin
    for (int p = 0; p < NUM_POS; p++)
      for (int h = 0; h < NUM_HARM; h++)
        table_q[p][h] = static_coef(h, POS_X[p], POS_Y[p]);
  end

  logic [$clog2(NUM_POS > 1 ? NUM_POS : 2)-1:0] index_select;

  always_comb begin
    index_select = '0;
    for (int p = 0; p < NUM_POS; p++)
      if (coord.x == 6'(POS_X[p]) && coord.y == 6'(POS_Y[p]) && coord.z == 5'd0)
        index_select = p[$bits(index_select)-1:0];
  end

  assign coefs        = table_q[index_select];
  assign coeffs_valid = 1'b1;

endmodule
