// coeff_full_tb: random source coordinates; after each ready pulse checks
// that coeffs_valid rises exactly COEFF_LATENCY clocks later, that every
// source's 16 coefficients match the trigonometric reference (within 1
// LSB, zero for the five harmonics without a ROM), and that a ready pulse
// clears coeffs_valid.
module coeff_full_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, ready = 1'b0;
  coord_t [NUM_SRC-1:0] coord;
  cvec_t  [NUM_SRC-1:0] coefs;
  logic cv;

  coeff_full dut (.clk(clk), .rst(rst), .ready(ready), .coord(coord), .coefs(coefs),
                  .coeffs_valid(cv));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coord = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 200; t++) begin
      int lat;
      coord_t [NUM_SRC-1:0] c_now;
      for (int s = 0; s < NUM_SRC; s++) begin
        c_now[s].x = 6'($urandom);
        c_now[s].y = 6'($urandom);
        c_now[s].z = 5'd0;
      end
      if (t == 0) c_now = '0;
      coord <= c_now;
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      coord <= '1;  // later changes must not disturb this frame
      #1;
      lat = 1;
      while (!cv && lat < 50) begin
        @(posedge clk);
        #1;
        lat++;
      end
      checks++;
      if (lat != COEFF_LATENCY) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      for (int s = 0; s < NUM_SRC; s++)
        for (int h = 0; h < NUM_HARM; h++) begin
          int e;
          e = rom_ref(h, int'(c_now[s].x), int'(c_now[s].y));
          checks++;
          if (iabs(int'(coefs[s][h]) - e) > 1) begin
            failures++;
            if (failures < 10) $display("FAIL src %0d h %0d got %0d exp %0d", s, h, int'(coefs[s][h]), e);
          end
        end
      repeat ($urandom_range(0, 5)) @(posedge clk);
      checks++;
      if (!cv) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
