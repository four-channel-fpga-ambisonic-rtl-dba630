// pcm1681_driver_tb: drives random stereo words and decodes the serial
// output with a behavioural PCM1681 receiver. Checks the clock periods
// (sclk 4, bclk 16, lrclk 768 system clocks), that lrclk changes and data
// changes happen only where bclk falls, that ready pulses once per frame at
// the rising edge of lrclk, that every word arrives MSB first on the right
// line and channel, and the constant control pins.
module pcm1681_driver_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst = 1'b1;
  logic [3:0][31:0] audio = '0;
  logic sclk, bclk, lrclk, ready, demp, mute;
  logic [3:0] sdata;
  logic [1:0] fmt;
  logic [3:0][15:0] left, right;
  int frames, bit_errors;

  pcm1681_driver dut (.clk(clk), .rst(rst), .audio(audio), .sclk(sclk), .bclk(bclk),
    .lrclk(lrclk), .serial_data(sdata), .fmt(fmt), .demp(demp), .mute(mute), .ready(ready));

  pcm1681_model dac (.bclk(bclk), .lrclk(lrclk), .sdata(sdata), .left(left), .right(right),
    .frames(frames), .bit_errors(bit_errors));

  // edge bookkeeping on the system clock
  logic sclk_q, bclk_q, lrclk_q;
  logic [3:0] sdata_q;
  int cyc = 0, last_s = -1, last_b = -1, last_l = -1, last_ready = -1, readies = 0;
  always @(posedge clk) begin
    sclk_q <= sclk; bclk_q <= bclk; lrclk_q <= lrclk; sdata_q <= sdata;
    cyc <= cyc + 1;
    if (!rst && cyc > 10) begin
      if (sclk && !sclk_q) begin
        if (last_s >= 0) begin checks++; if (cyc - last_s != 4) failures++; end
        last_s <= cyc;
      end
      if (bclk && !bclk_q) begin
        if (last_b >= 0) begin checks++; if (cyc - last_b != 16) failures++; end
        last_b <= cyc;
      end
      if (lrclk != lrclk_q) begin
        checks++;
        if (!(bclk_q && !bclk)) begin failures++; $display("FAIL lrclk edge not at bclk fall"); end
      end
      if (lrclk && !lrclk_q) begin
        if (last_l >= 0) begin checks++; if (cyc - last_l != 768) failures++; end
        last_l <= cyc;
      end
      if (sdata != sdata_q) begin
        checks++;
        if (!(bclk_q && !bclk)) begin failures++; $display("FAIL data edge not at bclk fall"); end
      end
      if (ready) begin
        readies++;
        checks++;
        if (!(lrclk && !lrclk_q)) begin failures++; $display("FAIL ready not at lrclk rise"); end
        if (last_ready >= 0) begin checks++; if (cyc - last_ready != 768) failures++; end
        last_ready <= cyc;
      end
    end
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0][31:0] sent;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 40; f++) begin
      int fr;
      @(posedge clk iff ready);
      for (int l = 0; l < 4; l++) audio[l] <= $urandom;
      if (f == 1) audio <= '1;
      if (f == 2) audio <= {4{32'h8000_0001}};
      @(posedge clk);
      sent = audio;
      // the words go out in the frame after the next ready
      fr = frames;
      wait (frames == fr + 2);
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (left[l] !== sent[l][31:16] || right[l] !== sent[l][15:0]) begin
          failures++;
          if (failures < 10) $display("FAIL line %0d got %h/%h exp %h", l, left[l], right[l], sent[l]);
        end
      end
    end
    checks++;
    if (bit_errors != 0 || fmt !== 2'b10 || demp !== 1'b0 || mute !== 1'b0 || readies < 40) begin
      failures++;
      $display("FAIL bit_errors=%0d readies=%0d", bit_errors, readies);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
