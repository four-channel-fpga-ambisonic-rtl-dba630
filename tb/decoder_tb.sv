// decoder_tb: the four corner-speaker decoders with random mixed streams.
// Checks audio_out against the low 16 bits of the sum of the 16-MSB
// products with the reference speaker coefficients, the DEC_LATENCY cycle
// count from summing_valid to decoder_valid, and that the output holds
// across the next ready pulse.
module decoder_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    rst = 1'b1, ready = 1'b0, sv = 1'b0;
  hvec_t   s;
  sample_t out [4];
  logic    dv  [4];
  int      px  [4] = '{31, 31, -31, -31};
  int      py  [4] = '{31, -31, 31, -31};

  decoder #(.X( 6'sd31), .Y( 6'sd31)) d0 (.clk(clk), .rst(rst), .ready(ready), .s(s),
    .summing_valid(sv), .audio_out(out[0]), .decoder_valid(dv[0]));
  decoder #(.X( 6'sd31), .Y(-6'sd31)) d1 (.clk(clk), .rst(rst), .ready(ready), .s(s),
    .summing_valid(sv), .audio_out(out[1]), .decoder_valid(dv[1]));
  decoder #(.X(-6'sd31), .Y( 6'sd31)) d2 (.clk(clk), .rst(rst), .ready(ready), .s(s),
    .summing_valid(sv), .audio_out(out[2]), .decoder_valid(dv[2]));
  decoder #(.X(-6'sd31), .Y(-6'sd31)) d3 (.clk(clk), .rst(rst), .ready(ready), .s(s),
    .summing_valid(sv), .audio_out(out[3]), .decoder_valid(dv[3]));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 300; t++) begin
      int lat;
      int e [4];
      hvec_t s_now;
      for (int h = 0; h < NUM_HARM; h++) s_now[h] = sample_t'($urandom);
      if (t == 1) s_now = {NUM_HARM{16'sh7fff}};
      if (t == 2) s_now = {NUM_HARM{16'sh8000}};
      for (int d = 0; d < 4; d++) begin
        e[d] = 0;
        for (int h = 0; h < NUM_HARM; h++) e[d] += mulhi(int'(s_now[h]), static_ref(h, px[d], py[d]));
        e[d] = wrap16(e[d]);
      end
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      s     <= s_now;
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #1;
      checks++;
      if (dv[0]) begin failures++; $display("FAIL valid before summing_valid"); end
      @(posedge clk);
      sv <= 1'b1;
      @(posedge clk);
      lat = 1;
      #1;
      while (!dv[0] && lat < 60) begin
        @(posedge clk);
        #1;
        lat++;
      end
      checks++;
      if (lat != DEC_LATENCY) begin failures++; $display("FAIL latency %0d", lat); end
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (int'(out[d]) != e[d] || !dv[d]) begin
          failures++;
          if (failures < 10) $display("FAIL dec %0d got %0d exp %0d", d, out[d], e[d]);
        end
      end
      @(posedge clk);
      sv    <= 1'b0;
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      #1;
      checks++;
      if (dv[0] || int'(out[0]) != e[0]) begin failures++; $display("FAIL hold/clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
