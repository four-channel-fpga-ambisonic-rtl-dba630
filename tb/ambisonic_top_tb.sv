// ambisonic_top_tb: end-to-end test of the whole system at its default
// sizes (4096-byte buffer, 270000-cycle button debounce, 36.864 MHz audio
// clock, 65 MHz video clock).
//
// A model of the USB FIFO chip streams a known four-channel 16-bit sample
// sequence; a model of the DAC's serial input collects the four data lines.
// Every frame the DAC receives is compared with a reference computed here
// from the sample sequence and the published source positions: ROM gains
// (0.96, clamped, distance falloff beyond radius 20), encode by the top
// half of each product, mix as (a+b+c+d)>>>2, decode with the speaker table
// (0.95) at (31,31), (31,-31), (-31,31), (-31,-31) and sum. Frames are only
// compared when the positions have been still for a while, since position
// changes cross from the video clock domain at an arbitrary point.
//
// Scenario: fill the buffer and start playing; hold right and down with
// sources 0 and 1 selected until they sit in the corner beyond the falloff
// radius; tap a button for far less than the debounce time; pause the host
// so the buffer runs dry, then let it refill; press preset button 1 and
// watch the sources glide back one unit per video frame; finally show the
// two monitor test pictures (outline, colour bars). Each of those
// mechanisms is counted, and one that never happened counts as a failure.
// The frame rate (one DAC frame per 768 audio clocks) and the frame-to-frame
// continuity of the sample sequence are checked as well.
module ambisonic_top_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk_a = 1'b0, clk_v = 1'b0;
  always #13.563 clk_a = ~clk_a;   // 36.864 MHz
  always #7.692 clk_v = ~clk_v;    // 65 MHz

  logic reset = 1'b1;
  logic usb_rxf_n, usb_rd_n, usb_wr;
  logic [7:0] usb_data;
  logic pcm_sclk, pcm_bclk, pcm_lrclk;
  logic [3:0] pcm_data;
  logic [1:0] pcm_fmt;
  logic pcm_demp, pcm_mute;
  logic vga_hsync, vga_vsync, vga_blank;
  logic [2:0] vga_rgb;
  logic [3:0] button_preset_n = 4'hf;
  logic button_up_n = 1'b1, button_down_n = 1'b1, button_left_n = 1'b1, button_right_n = 1'b1;
  logic [7:0] switches = 8'hff;   // active low: no source selected
  logic led_buffer_full, led_buffer_empty;
  logic [1:0] active_preset;
  logic [3:0] usb_status;

  ambisonic_top dut (
    .clock_36mhz(clk_a), .clock_65mhz(clk_v), .reset(reset),
    .usb_rxf_n(usb_rxf_n), .usb_rd_n(usb_rd_n), .usb_wr(usb_wr), .usb_data(usb_data),
    .pcm_sclk(pcm_sclk), .pcm_bclk(pcm_bclk), .pcm_lrclk(pcm_lrclk), .pcm_data(pcm_data),
    .pcm_fmt(pcm_fmt), .pcm_demp(pcm_demp), .pcm_mute(pcm_mute),
    .vga_hsync(vga_hsync), .vga_vsync(vga_vsync), .vga_blank(vga_blank), .vga_rgb(vga_rgb),
    .button_preset_n(button_preset_n), .button_up_n(button_up_n), .button_down_n(button_down_n),
    .button_left_n(button_left_n), .button_right_n(button_right_n), .switches(switches),
    .led_buffer_full(led_buffer_full), .led_buffer_empty(led_buffer_empty),
    .active_preset(active_preset), .usb_status(usb_status)
  );

  logic host_pause = 1'b0;
  int sent;
  dlp_usb245m_model #(.RECOVER(3)) u_host (
    .clk(clk_a), .rst(reset), .rd_n(usb_rd_n), .pause(host_pause), .limit(0),
    .rxf_n(usb_rxf_n), .data(usb_data), .sent(sent)
  );

  logic [3:0][15:0] dac_left, dac_right;
  int dac_frames, dac_bit_errors;
  pcm1681_model u_dac (
    .bclk(pcm_bclk), .lrclk(pcm_lrclk), .sdata(pcm_data), .left(dac_left), .right(dac_right),
    .frames(dac_frames), .bit_errors(dac_bit_errors)
  );

  localparam int SPK_X [4] = '{31, 31, -31, -31};
  localparam int SPK_Y [4] = '{31, -31, 31, -31};

  // mechanism counters
  int n_play_start = 0, n_underrun = 0, n_led_full = 0, n_led_empty = 0;
  int n_edit = 0, n_clamp = 0, n_falloff = 0, n_glide = 0, n_preset = 0, n_bounce_ignored = 0;
  int n_audio_checked = 0, n_repeat = 0, n_rate = 0;
  int video_frames = 0;
  logic [7:0] colours_seen = '0;

  function automatic int sample_ref(int frame, int ch);
    logic [15:0] v;
    v = 16'((frame * 1237 + ch * 9001) ^ (ch << 13)) ^ 16'(frame * frame * 7);
    return sext16(v);
  endfunction

  // reference for one frame: [0..3] speaker channels, [4] W of source 0,
  // [5] W of the mix
  function automatic void chain_ref(int frame, coord_t [3:0] c, output int r [6]);
    int enc [4][16];
    int mix [16];
    int s;
    for (int i = 0; i < 4; i++)
      for (int h = 0; h < 16; h++)
        enc[i][h] = mulhi(sample_ref(frame, i), rom_ref(h, int'(c[i].x), int'(c[i].y)));
    for (int h = 0; h < 16; h++)
      mix[h] = wrap16((enc[0][h] + enc[1][h] + enc[2][h] + enc[3][h]) >>> 2);
    for (int k = 0; k < 4; k++) begin
      s = 0;
      for (int h = 0; h < 16; h++) s += mulhi(mix[h], static_ref(h, SPK_X[k], SPK_Y[k]));
      r[k] = wrap16(s);
    end
    r[4] = enc[0][0];
    r[5] = mix[0];
  endfunction

  initial begin
    #1_500_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- audio checking, one pass per received DAC frame ----------
  coord_t [3:0] last_coord;
  int frames_since_move = 0;
  int cur_n = -1;
  always @(posedge clk_v) begin
    if (dut.vcoord != last_coord) begin
      frames_since_move = 0;
      last_coord = dut.vcoord;
    end
  end

  initial begin
    int last_frames, found, r [6];
    last_frames = 0;
    forever begin
      @(posedge clk_a);
      if (dac_frames != last_frames) begin
        last_frames = dac_frames;
        frames_since_move++;
        // locate the frame of the stream being played on the raw line
        found = -1;
        for (int n = (cur_n < 0 ? 0 : cur_n); n <= (cur_n < 0 ? 0 : cur_n) + 2; n++)
          if (sample_ref(n, 0) == sext16(dac_left[2])) begin found = n; break; end
        checks++;
        if (found < 0) begin
          failures++;
          if (failures < 20)
            $display("FAIL DAC frame %0d: raw sample %h follows no frame after %0d", dac_frames,
                     dac_left[2], cur_n);
        end else begin
          if (found == cur_n) n_repeat++;
          cur_n = found;
          if (frames_since_move > 8 && n_play_start > 0 && cur_n > 0) begin
            chain_ref(cur_n, last_coord, r);
            n_audio_checked++;
            for (int k = 0; k < 4; k++) begin
              if (last_coord[k].x * last_coord[k].x + last_coord[k].y * last_coord[k].y > 400 &&
                  sample_ref(cur_n, k) != 0)
                n_falloff++;
            end
            checks++;
            if (sext16(dac_left[0]) != r[0] || sext16(dac_right[0]) != r[1] ||
                sext16(dac_left[1]) != r[2] || sext16(dac_right[1]) != r[3] ||
                sext16(dac_right[2]) != r[4] || sext16(dac_left[3]) != r[5] ||
                sext16(dac_right[3]) != r[0]) begin
              failures++;
              if (failures < 20)
                $display("FAIL frame %0d: got %0d %0d %0d %0d w %0d mix %0d, expected %0d %0d %0d %0d w %0d mix %0d",
                         cur_n, sext16(dac_left[0]), sext16(dac_right[0]), sext16(dac_left[1]),
                         sext16(dac_right[1]), sext16(dac_right[2]), sext16(dac_left[3]),
                         r[0], r[1], r[2], r[3], r[4], r[5]);
            end
          end
        end
      end
    end
  end

  // frame rate: lrclk rises every 768 audio clocks
  initial begin
    int t;
    @(negedge reset);
    @(posedge pcm_lrclk);
    @(posedge clk_a);
    forever begin
      logic prev;
      t = 0;
      prev = 1'b1;
      forever begin
        @(posedge clk_a);
        t++;
        if (pcm_lrclk && !prev) break;
        prev = pcm_lrclk;
      end
      checks++;
      if (t != 768) begin
        failures++;
        if (failures < 20) $display("FAIL lrclk period %0d", t);
      end else n_rate++;
    end
  end

  // status and indicators
  logic play_q = 1'b0, full_q = 1'b0, empty_q = 1'b0;
  always @(posedge clk_a) begin
    if (!reset) begin
      if (usb_status[2] && !play_q) n_play_start++;
      if (usb_status[3]) n_underrun++;
      if (led_buffer_full && !full_q) n_led_full++;
      if (led_buffer_empty && !empty_q) n_led_empty++;
      play_q <= usb_status[2];
      full_q <= led_buffer_full;
      empty_q <= led_buffer_empty;
    end
  end

  always @(posedge clk_v) if (!vga_blank) colours_seen[vga_rgb] <= 1'b1;

  logic count_pixels = 1'b0;
  int lit_pixels = 0, n_test_picture = 0;
  logic [7:0] bar_colours = '0;
  always @(posedge clk_v)
    if (count_pixels && !vga_blank) begin
      if (vga_rgb != 3'b000) lit_pixels++;
      bar_colours[vga_rgb] <= 1'b1;
    end

  // video frames and position bookkeeping
  coord_t [3:0] frame_coord;
  task automatic next_video_frame();
    coord_t [3:0] prev;
    prev = dut.vcoord;
    @(negedge vga_vsync);
    video_frames++;
    repeat (10) @(posedge clk_v);
    frame_coord = dut.vcoord;
    for (int i = 0; i < 4; i++) begin
      int dx, dy;
      dx = int'(frame_coord[i].x) - int'(prev[i].x);
      dy = int'(frame_coord[i].y) - int'(prev[i].y);
      checks++;
      if (dx < -1 || dx > 1 || dy < -1 || dy > 1) begin
        failures++;
        $display("FAIL source %0d jumped by %0d,%0d in one frame", i, dx, dy);
      end
    end
  endtask

  initial begin
    int xs, ys;
    repeat (8) @(posedge clk_a);
    reset <= 1'b0;
    checks++;
    if (pcm_fmt != 2'b10 || pcm_demp || pcm_mute || !usb_wr) begin
      failures++;
      $display("FAIL DAC control pins %b %b %b", pcm_fmt, pcm_demp, pcm_mute);
    end

    // 1. buffer fills, playback starts
    wait (usb_status[2]);
    $display("playing after %0d bytes", sent);
    checks++;
    // the byte that fills the buffer is written two clocks before its read
    // strobe ends, so the host has counted one byte less at that moment
    if (sent + 1 < 4096) begin failures++; $display("FAIL playback began before the buffer was full"); end
    next_video_frame();

    // 2. move sources 0 and 1 right and down into the corner
    switches = ~8'b0000_1100;
    button_right_n = 1'b0;
    button_down_n = 1'b0;
    for (int f = 0; f < 18; f++) begin
      xs = int'(frame_coord[0].x);
      next_video_frame();
      if (int'(frame_coord[0].x) == xs + 1) n_edit++;
      if (int'(frame_coord[0].x) == 15 && xs == 15) n_clamp++;
    end
    button_right_n = 1'b1;
    button_down_n = 1'b1;
    next_video_frame();
    next_video_frame();
    checks++;
    if (frame_coord[0].x != 6'sd15 || frame_coord[0].y != 6'sd15 ||
        frame_coord[1].x != 6'sd15 || frame_coord[1].y != 6'sd15 ||
        frame_coord[2].x != 6'sd0 || frame_coord[3].y != 6'sd0) begin
      failures++;
      $display("FAIL positions after editing: %0d,%0d %0d,%0d %0d,%0d", frame_coord[0].x,
               frame_coord[0].y, frame_coord[1].x, frame_coord[1].y, frame_coord[2].x, frame_coord[2].y);
    end

    // source 1 alone moves up a little, so the two blobs no longer overlap
    switches = ~8'b0000_1000;
    button_up_n = 1'b0;
    next_video_frame();
    next_video_frame();
    next_video_frame();
    button_up_n = 1'b1;
    next_video_frame();
    next_video_frame();
    checks++;
    if (frame_coord[1].y >= 6'sd15 || frame_coord[1].y < 6'sd10 || frame_coord[1].x != 6'sd15 ||
        frame_coord[0].y != 6'sd15) begin
      failures++;
      $display("FAIL source 1 at %0d,%0d after moving up", frame_coord[1].x, frame_coord[1].y);
    end else n_edit++;
    switches = ~8'b0000_1100;

    // 3. a press far shorter than the debounce time does nothing
    @(posedge vga_vsync);
    @(posedge clk_v);
    button_left_n = 1'b0;
    repeat (2000) @(posedge clk_v);
    button_left_n = 1'b1;
    next_video_frame();
    next_video_frame();
    checks++;
    if (frame_coord[0].x != 6'sd15) begin
      failures++;
      $display("FAIL a short tap moved source 0 to x=%0d", frame_coord[0].x);
    end else n_bounce_ignored++;

    // 4. host stops sending: the buffer runs dry, then refills
    host_pause = 1'b1;
    wait (!usb_status[2]);
    $display("buffer ran dry after %0d bytes", sent);
    repeat (20 * 768) @(posedge clk_a);
    host_pause = 1'b0;
    wait (usb_status[2]);
    $display("playing again after %0d bytes", sent);
    switches = 8'hff;

    // 5. preset 1 (all sources at the origin) makes the sources glide back
    next_video_frame();
    button_preset_n[1] = 1'b0;
    next_video_frame();
    button_preset_n[1] = 1'b1;
    checks++;
    if (active_preset != 2'd1) begin failures++; $display("FAIL active preset %0d", active_preset); end
    else n_preset++;
    for (int f = 0; f < 4; f++) begin
      xs = int'(frame_coord[0].x);
      ys = int'(frame_coord[1].y);
      next_video_frame();
      if (int'(frame_coord[0].x) == xs - 1 && int'(frame_coord[1].y) == ys - 1) n_glide++;
    end
    repeat (40) @(posedge pcm_lrclk);

    // 6. monitor test pictures: outline, then colour bars
    switches = 8'hfd;
    @(negedge vga_vsync);
    @(posedge vga_vsync);
    count_pixels = 1'b1;
    @(negedge vga_vsync);
    count_pixels = 1'b0;
    checks++;
    if (lit_pixels != 2 * 1024 + 2 * 768 - 4) begin
      failures++;
      $display("FAIL outline picture has %0d lit pixels", lit_pixels);
    end else n_test_picture++;
    switches = 8'hfe;
    lit_pixels = 0;
    bar_colours = '0;
    @(negedge vga_vsync);
    @(posedge vga_vsync);
    count_pixels = 1'b1;
    @(negedge vga_vsync);
    count_pixels = 1'b0;
    checks++;
    if (bar_colours != 8'hff) begin
      failures++;
      $display("FAIL colour bars show colours %b", bar_colours);
    end else n_test_picture++;
    switches = 8'hff;

    $display("video frames %0d, DAC frames %0d (%0d compared, %0d repeats), rate checks %0d",
             video_frames, dac_frames, n_audio_checked, n_repeat, n_rate);
    $display("play starts %0d, underrun frames %0d, full LED %0d, empty LED %0d",
             n_play_start, n_underrun, n_led_full, n_led_empty);
    $display("edits %0d, clamps %0d, ignored taps %0d, preset switches %0d, glide steps %0d, falloff frames %0d",
             n_edit, n_clamp, n_bounce_ignored, n_preset, n_glide, n_falloff);
    checks++;
    if (dac_bit_errors != 0) begin failures++; $display("FAIL %0d stray DAC bits", dac_bit_errors); end
    checks++;
    if (colours_seen[3'b110] == 0 || colours_seen[3'b011] == 0 || colours_seen[3'b101] == 0 ||
        colours_seen[3'b001] == 0) begin
      failures++;
      $display("FAIL colours seen on screen %b", colours_seen);
    end
    checks++; if (n_play_start < 2) begin failures++; $display("FAIL playback did not restart"); end
    checks++; if (n_underrun == 0) begin failures++; $display("FAIL no underrun"); end
    checks++; if (n_led_full == 0 || n_led_empty == 0) begin failures++; $display("FAIL LEDs"); end
    checks++; if (n_edit < 10) begin failures++; $display("FAIL too few edits"); end
    checks++; if (n_clamp == 0) begin failures++; $display("FAIL edit limit never reached"); end
    checks++; if (n_falloff == 0) begin failures++; $display("FAIL falloff never exercised"); end
    checks++; if (n_glide < 4) begin failures++; $display("FAIL glide"); end
    checks++; if (n_test_picture != 2) begin failures++; $display("FAIL test pictures"); end
    checks++; if (n_preset == 0) begin failures++; $display("FAIL preset switch"); end
    checks++; if (n_audio_checked < 1000) begin failures++; $display("FAIL too few frames compared"); end
    checks++; if (n_repeat == 0) begin failures++; $display("FAIL no repeated frame during underrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
