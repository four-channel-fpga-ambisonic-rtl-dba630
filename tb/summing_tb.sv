// summing_tb: random encoded streams; checks each mixed harmonic against
// (a+b+c+d)>>>2, that summing_valid waits for all four encoders and rises
// exactly one clock after the last, and that ready clears it.
module summing_tb;
  import ambi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1, ready = 1'b0;
  hvec_t [NUM_SRC-1:0] enc;
  logic  [NUM_SRC-1:0] ev;
  hvec_t sum;
  logic  sv;

  summing dut (.clk(clk), .rst(rst), .ready(ready), .enc(enc), .enc_valid(ev), .sum(sum),
               .summing_valid(sv));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enc = '0;
    ev  = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 500; t++) begin
      hvec_t [NUM_SRC-1:0] e_now;
      for (int s = 0; s < NUM_SRC; s++)
        for (int h = 0; h < NUM_HARM; h++) e_now[s][h] = sample_t'($urandom);
      if (t == 1) e_now = {NUM_SRC * NUM_HARM{16'sh8000}};
      if (t == 2) e_now = {NUM_SRC * NUM_HARM{16'sh7fff}};
      @(posedge clk);
      ready <= 1'b1;
      @(posedge clk);
      ready <= 1'b0;
      enc   <= e_now;
      // raise the encoder valids one by one in random order
      for (int k = 0; k < NUM_SRC; k++) begin
        int s;
        do s = $urandom_range(0, NUM_SRC - 1); while (ev[s]);
        @(posedge clk);
        #1;
        checks++;
        if (sv) begin failures++; $display("FAIL valid early"); end
        ev[s] = 1'b1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (!sv) begin failures++; $display("FAIL valid not one cycle after encoders"); end
      for (int h = 0; h < NUM_HARM; h++) begin
        int a;
        a = 0;
        for (int s = 0; s < NUM_SRC; s++) a += int'(e_now[s][h]);
        a = a >>> 2;
        checks++;
        if (int'(sum[h]) != a) begin
          failures++;
          if (failures < 10) $display("FAIL h %0d got %0d exp %0d", h, sum[h], a);
        end
      end
      enc <= '0;   // outputs must hold after the capture
      @(posedge clk);
      #1;
      checks++;
      if (int'(sum[0]) != ((int'(e_now[0][0]) + int'(e_now[1][0]) + int'(e_now[2][0]) + int'(e_now[3][0])) >>> 2))
        failures++;
      ev = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
