// enc_multiplier_tb: random samples and coefficients, including full-scale
// corners. Checks every encoded output against the 16-MSB product, the
// ENC_LATENCY cycle count from c_valid to encoder_valid, that nothing starts
// before c_valid, and that ready clears encoder_valid.
module enc_multiplier_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst = 1'b1, ready = 1'b0, c_valid = 1'b0;
  sample_t sample;
  cvec_t   coefs;
  hvec_t   e;
  logic    ev;

  enc_multiplier dut (.clk(clk), .rst(rst), .ready(ready), .c_valid(c_valid), .sample(sample),
                      .coefs(coefs), .e(e), .encoder_valid(ev));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample = '0;
    coefs  = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 300; t++) begin
      int lat;
      sample_t s_now;
      cvec_t   c_now;
      s_now = sample_t'($urandom);
      for (int h = 0; h < NUM_HARM; h++) c_now[h] = coef_t'($urandom);
      if (t == 1) begin s_now = 16'sh8000; c_now = {16{16'sh8000}}; end
      if (t == 2) begin s_now = 16'sh7fff; c_now = {16{16'sh8000}}; end
      if (t == 3) begin s_now = 16'sh8000; c_now = {16{16'sh7fff}}; end
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready   <= 1'b0;
      sample  <= s_now;
      coefs   <= c_now;
      // hold off c_valid for a while: the encoder must wait
      repeat ($urandom_range(1, 8)) @(posedge clk);
      #1;
      checks++;
      if (ev) begin failures++; $display("FAIL valid before c_valid"); end
      @(posedge clk);
      c_valid <= 1'b1;
      @(posedge clk);
      lat = 1;
      #1;
      while (!ev && lat < 60) begin
        @(posedge clk);
        #1;
        lat++;
      end
      checks++;
      if (lat != ENC_LATENCY) begin failures++; $display("FAIL latency %0d", lat); end
      for (int h = 0; h < NUM_HARM; h++) begin
        checks++;
        if (int'(e[h]) != mulhi(int'(s_now), int'(c_now[h]))) begin
          failures++;
          if (failures < 10) $display("FAIL h %0d got %0d exp %0d", h, e[h], mulhi(int'(s_now), int'(c_now[h])));
        end
      end
      @(posedge clk);
      ready   <= 1'b1;
      c_valid <= 1'b0;
      @(posedge clk);
      ready <= 1'b0;
      #1;
      checks++;
      if (ev) begin failures++; $display("FAIL ready did not clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
