// debounce_tb: bouncing presses and releases; the clean output must change
// only after the input has been stable for DELAY+1 clocks, and never follow
// a bounce shorter than that.
module debounce_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DELAY = 20;
  logic reset = 1'b1, noisy = 1'b0, clean;
  int stable = 0, changes = 0;
  logic last_noisy = 1'b0, exp_clean = 1'b0;

  debounce #(.DELAY(DELAY)) dut (.clock(clk), .reset(reset), .noisy(noisy), .clean(clean));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: clean takes the input value once it has been seen unchanged
  // on DELAY+1 consecutive clock edges after a change
  always @(posedge clk) begin
    if (reset) begin
      stable = 0;
      last_noisy = noisy;
      exp_clean = noisy;
    end else begin
      if (noisy != last_noisy) begin
        stable = 0;
        last_noisy = noisy;
      end else if (stable == DELAY) begin
        if (exp_clean != last_noisy) changes++;
        exp_clean = last_noisy;
      end else begin
        stable++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      // mostly stable stretches with bursts of bounce
      if ($urandom_range(0, 99) < (((t / 200) % 2) ? 30 : 1)) noisy = ~noisy;
      #1;
      checks++;
      if (clean !== exp_clean) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d clean=%b exp=%b", t, clean, exp_clean);
      end
    end
    checks++;
    if (changes < 4) begin failures++; $display("FAIL output changed only %0d times", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
