// coeff_static_tb: the speaker coefficient table against the published
// values for the four corner speakers (hex Q1.15: 0x55fb, 0x3ccc, 0x7999, 0x3e70),
// against the trigonometric reference, and the default entry for unknown
// coordinates.
module coeff_static_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  coord_t coord;
  cvec_t  coefs;
  logic   cv;

  coeff_static dut (.coord(coord), .coefs(coefs), .coeffs_valid(cv));

  // Expected tables for (31,31), (31,-31), (-31,31), (-31,-31).
  localparam int A = 'h55fb, R = 'h3ccc, V = 'h7999, L = 'h3e70;
  int exp_tab [4][16] = '{
    '{ A,  A,  A, 0, -R, 0, 0, 0,  V, 0, -L, -L, 0, 0, -A,  A},
    '{ A,  A, -A, 0, -R, 0, 0, 0, -V, 0, -L,  L, 0, 0, -A, -A},
    '{ A, -A,  A, 0, -R, 0, 0, 0, -V, 0,  L, -L, 0, 0,  A,  A},
    '{ A, -A, -A, 0, -R, 0, 0, 0,  V, 0,  L,  L, 0, 0,  A, -A}};
  int px [4] = '{31, 31, -31, -31};
  int py [4] = '{31, -31, 31, -31};

  initial begin
    for (int p = 0; p < 4; p++) begin
      coord = '{x: 6'(px[p]), y: 6'(py[p]), z: 5'sd0};
      #1;
      for (int h = 0; h < 16; h++) begin
        checks++;
        if (iabs(int'(coefs[h]) - exp_tab[p][h]) > 1) begin
          failures++;
          $display("FAIL pos %0d h %0d: got %0d exp %0d", p, h, coefs[h], exp_tab[p][h]);
        end
        checks++;
        if (iabs(int'(coefs[h]) - static_ref(h, px[p], py[p])) > 1) failures++;
      end
      checks++;
      if (cv !== 1'b1) failures++;
    end
    coord = '{x: 6'sd5, y: 6'sd3, z: 5'sd0};
    #1;
    for (int h = 0; h < 16; h++) begin
      checks++;
      if (iabs(int'(coefs[h]) - exp_tab[0][h]) > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
