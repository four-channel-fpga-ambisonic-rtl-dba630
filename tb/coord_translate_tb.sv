// coord_translate_tb: exhaustive over all 64 x 64 coordinates: pixel offset
// = (unit + 32) * 8, independent of z.
module coord_translate_tb;
  import ambi_pkg::*;

  int checks = 0, failures = 0;
  coord_t c;
  logic [8:0] x, y;

  coord_translate dut (.coord(c), .x(x), .y(y));

  initial begin
    for (int xi = -32; xi < 32; xi++)
      for (int yi = -32; yi < 32; yi++) begin
        c = '{x: 6'(xi), y: 6'(yi), z: 5'($urandom)};
        #1;
        checks++;
        if (int'(x) != (xi + 32) * 8 || int'(y) != (yi + 32) * 8) begin
          failures++;
          $display("FAIL (%0d,%0d) -> (%0d,%0d)", xi, yi, x, y);
        end
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
