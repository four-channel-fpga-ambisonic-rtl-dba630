// usb_reader_tb: the reader against a behavioural DLP-USB245M with a small
// buffer. Checks the RD# strobe (low for exactly four clocks per byte),
// that fifo_wr is raised two clocks before RD# rises, that playback waits for a
// full buffer, that every published frame carries the host's samples in
// order, that a host pause causes underruns (audio held) and that playback
// resumes after the buffer has refilled, without losing or repeating a
// byte.
module usb_reader_tb;
  import ambi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LOGSIZE = 6;        // 64-byte buffer
  localparam int FRAME   = 150;      // clocks between ready pulses (shortened)

  logic rst = 1'b1, ready = 1'b0, pause = 1'b0;
  logic rxf_n, rd_n;
  logic [7:0] data;
  int sent;
  sample_t [3:0] audio;
  logic sc, fwr, ffull, fempty, playing, underrun;

  dlp_usb245m_model #(.RECOVER(3)) chip (.clk(clk), .rst(rst), .rd_n(rd_n), .pause(pause), .limit(0),
    .rxf_n(rxf_n), .data(data), .sent(sent));

  usb_reader #(.SAMPLE_BYTES(2), .CHANNELS(4), .FIFO_LOGSIZE(LOGSIZE)) dut (
    .clk(clk), .rst(rst), .ready(ready), .rxf_n(rxf_n), .rd_n(rd_n), .data(data),
    .audio_out(audio), .sample_complete(sc), .fifo_wr(fwr), .fifo_full(ffull),
    .fifo_empty(fempty), .playing(playing), .underrun(underrun));

  // ready pulse generator
  int ph = 0;
  always @(posedge clk) begin
    ph    <= (ph == FRAME - 1) ? 0 : ph + 1;
    ready <= (ph == FRAME - 1) && !rst;
  end

  // RD# and fifo_wr timing
  int rd_low = 0, wr_age = 99, strobes = 0;
  always @(posedge clk) if (!rst) begin
    if (!rd_n) rd_low <= rd_low + 1;
    else if (rd_low != 0) begin
      checks++;
      strobes++;
      if (rd_low != 4) begin failures++; $display("FAIL RD# low for %0d clocks", rd_low); end
      checks++;
      // fifo_wr must be high in the clock two clocks before RD# rises
      if (wr_age != 1) begin failures++; $display("FAIL fifo_wr timing (%0d)", wr_age); end
      rd_low <= 0;
    end
    wr_age <= fwr ? 0 : wr_age + 1;
  end

  int frame_no = 0, underruns = 0, resumes = 0;
  logic was_under = 1'b0;
  sample_t [3:0] last_audio = '0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // playback must not start before the buffer is full
    while (!ffull) begin
      @(posedge clk);
      #1;
      checks++;
      if (playing) begin failures++; $display("FAIL playing before full"); end
    end
    for (int n = 0; n < 200; n++) begin
      @(posedge clk iff ready);
      #1;
      if (!underrun) begin
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (audio[c] !== sample_t'(chip.sample_value(frame_no, c))) begin
            failures++;
            if (failures < 10) $display("FAIL frame %0d ch %0d got %h exp %h", frame_no, c, audio[c], chip.sample_value(frame_no, c));
          end
        end
        frame_no++;
        if (was_under) begin resumes++; was_under = 1'b0; end
      end else begin
        underruns++;
        was_under = 1'b1;
        checks++;
        if (audio !== last_audio) begin failures++; $display("FAIL audio changed on underrun"); end
      end
      last_audio = audio;
      if (n == 60)  pause <= 1'b1;    // host stalls
      if (n == 100) pause <= 1'b0;    // host resumes
    end
    checks++;
    if (underruns == 0 || resumes == 0 || strobes < 100) begin
      failures++;
      $display("FAIL mechanisms: underruns=%0d resumes=%0d strobes=%0d", underruns, resumes, strobes);
    end
    // no byte lost or repeated: bytes taken = bytes sent - bytes buffered
    checks++;
    if (frame_no * 8 > sent) begin failures++; $display("FAIL byte accounting"); end
    $display("usb_reader_tb: frames=%0d underruns=%0d resumes=%0d bytes=%0d", frame_no, underruns, resumes, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
