// ambisonic_top: four-source, third-order (2-D) ambisonic panner.
//
// Four mono audio channels arrive over USB, are placed at user-chosen
// positions in the horizontal plane, encoded into a 16-harmonic ambisonic
// stream, mixed, and decoded for four loudspeakers at the corners of the
// coordinate square. A 1024 x 768 display shows the positions; push buttons
// move sources and recall presets.
//
// Audio domain (clock_36mhz, 36.864 MHz nominal, 768 clocks per 48 kHz
// sample): the PCM1681 driver's ready pulse starts every stage of a
// push-pull pipeline at once. The USB reader publishes a new 4-channel
// frame on ready; coeff_full looks up the coefficients of each source's
// current position (coeffs_valid 6 clocks later); each encoder scales its
// sample by those 16 coefficients (encoder_valid 19 clocks later); summing
// mixes the four streams (1 clock); each decoder projects the mix onto its
// speaker (19 clocks). On the next ready, if all decoders are valid, their
// results are latched for the DAC, which sends them during the frame after.
// The whole chain needs about 45 of the 768 clocks in a sample period.
//
// Video domain (clock_65mhz): xvga timing, the position-map UI and the
// preset manager. Source coordinates cross into the audio domain through
// sync_coord (three flip-flop layers). Switches [1:0] can replace the map
// with a screen outline (01) or colour bars (10) for setting up the monitor.
//
// DAC line use: line 0 = speakers 1/2, line 1 = speakers 3/4; lines 2 and 3
// carry monitor taps (input channel 0 / its encoded W, mixed W / speaker 1).
//
// Speaker positions (31,31), (31,-31), (-31,31), (-31,-31) and the monitor
// taps follow the original board wiring. The reset synchronizers are this
// design's addition. The DCM that makes the two clocks from the board's
// 27 MHz oscillator, the USB chip and the DAC are outside this module.
module ambisonic_top
  import ambi_pkg::*;
#(
  parameter int DEBOUNCE_DELAY = 270000,
  parameter int FIFO_LOGSIZE   = 12
) (
  input  logic       clock_36mhz,
  input  logic       clock_65mhz,
  input  logic       reset,
  // DLP-USB245M
  input  logic       usb_rxf_n,
  output logic       usb_rd_n,
  output logic       usb_wr,        // held high: the board never sends to the host
  input  logic [7:0] usb_data,
  // PCM1681
  output logic       pcm_sclk,
  output logic       pcm_bclk,
  output logic       pcm_lrclk,
  output logic [3:0] pcm_data,
  output logic [1:0] pcm_fmt,
  output logic       pcm_demp,
  output logic       pcm_mute,
  // display
  output logic       vga_hsync,
  output logic       vga_vsync,
  output logic       vga_blank,
  output logic [2:0] vga_rgb,
  // controls (push buttons active low, switches active low: a source is selected for editing while its switch reads 0)
  input  logic [3:0] button_preset_n,
  input  logic       button_up_n,
  input  logic       button_down_n,
  input  logic       button_left_n,
  input  logic       button_right_n,
  input  logic [7:0] switches,      // [5:2] low selects sources 0..3 for editing
  // indicators
  output logic       led_buffer_full,
  output logic       led_buffer_empty,
  output logic [1:0] active_preset,
  output logic [3:0] usb_status     // {underrun, playing, sample_complete, fifo_wr}
);

  // ------------------------------------------------------------- resets
  logic [1:0] rst_a_q, rst_v_q;
  logic       rst_a, rst_v;

  always_ff @(posedge clock_36mhz) rst_a_q <= {rst_a_q[0], reset};
  always_ff @(posedge clock_65mhz) rst_v_q <= {rst_v_q[0], reset};
  assign rst_a = rst_a_q[1] | reset;
  assign rst_v = rst_v_q[1] | reset;

  // ------------------------------------------------------------- video domain
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  logic        phsync, pvsync, pblank;
  logic [2:0]  pixel;
  logic [3:0]  preset_btn;
  logic        up, down, left, right;
  coord_t [NUM_SRC-1:0] vcoord, acoord;

  for (genvar b = 0; b < 4; b++) begin : g_db_preset
    debounce #(.DELAY(DEBOUNCE_DELAY)) u_db (
      .clock(clock_65mhz), .reset(rst_v), .noisy(~button_preset_n[b]), .clean(preset_btn[b])
    );
  end
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_up (
    .clock(clock_65mhz), .reset(rst_v), .noisy(~button_up_n), .clean(up));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_down (
    .clock(clock_65mhz), .reset(rst_v), .noisy(~button_down_n), .clean(down));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_left (
    .clock(clock_65mhz), .reset(rst_v), .noisy(~button_left_n), .clean(left));
  debounce #(.DELAY(DEBOUNCE_DELAY)) u_db_right (
    .clock(clock_65mhz), .reset(rst_v), .noisy(~button_right_n), .clean(right));

  xvga u_xvga (
    .vclock(clock_65mhz), .reset(rst_v),
    .hcount(hcount), .vcount(vcount), .hsync(hsync), .vsync(vsync), .blank(blank)
  );

  ambisonic_ui u_ui (
    .vclock       (clock_65mhz),
    .reset        (rst_v),
    .hcount       (hcount),
    .vcount       (vcount),
    .hsync        (hsync),
    .vsync        (vsync),
    .blank        (blank),
    .preset_btn   (preset_btn),
    .src_sel      (~switches[5:2]),
    .up           (up),
    .down         (down),
    .left         (left),
    .right        (right),
    .phsync       (phsync),
    .pvsync       (pvsync),
    .pblank       (pblank),
    .pixel        (pixel),
    .active_preset(active_preset),
    .coord        (vcoord)
  );

  // switches[1:0] pick the picture: 01 = one-pixel outline of the visible
  // area, 10 = colour bars (both for adjusting the monitor), else the map.
  always_ff @(posedge clock_65mhz) begin
    unique case (switches[1:0])
      2'b01: begin
        vga_hsync <= hsync;
        vga_vsync <= vsync;
        vga_blank <= blank;
        vga_rgb   <= (blank || !(hcount == 11'd0 || hcount == 11'd1023 ||
                                 vcount == 10'd0 || vcount == 10'd767)) ? 3'b000 : 3'b111;
      end
      2'b10: begin
        vga_hsync <= hsync;
        vga_vsync <= vsync;
        vga_blank <= blank;
        vga_rgb   <= blank ? 3'b000 : hcount[8:6];
      end
      default: begin
        vga_hsync <= phsync;
        vga_vsync <= pvsync;
        vga_blank <= pblank;
        vga_rgb   <= pblank ? 3'b000 : pixel;
      end
    endcase
  end

  // ------------------------------------------------------ clock crossing
  for (genvar i = 0; i < NUM_SRC; i++) begin : g_sync
    sync_coord #(.STAGES(3)) u_sync (.clk(clock_36mhz), .vcoord(vcoord[i]), .acoord(acoord[i]));
  end

  // ------------------------------------------------------------- audio domain
  logic                  ready;
  sample_t [NUM_SRC-1:0] audio_data;
  logic                  sample_complete, fifo_wr, fifo_full, fifo_empty, playing, underrun;
  cvec_t   [NUM_SRC-1:0] coefs;
  logic                  coeffs_valid;
  hvec_t   [NUM_SRC-1:0] enc;
  logic    [NUM_SRC-1:0] enc_valid;
  hvec_t                 mix;
  logic                  summing_valid;
  sample_t [NUM_SPK-1:0] chan;
  logic    [NUM_SPK-1:0] dec_valid;
  logic [3:0][31:0]      to_pcm;

  usb_reader #(.SAMPLE_BYTES(2), .CHANNELS(NUM_SRC), .FIFO_LOGSIZE(FIFO_LOGSIZE)) u_usb (
    .clk            (clock_36mhz),
    .rst            (rst_a),
    .ready          (ready),
    .rxf_n          (usb_rxf_n),
    .rd_n           (usb_rd_n),
    .data           (usb_data),
    .audio_out      (audio_data),
    .sample_complete(sample_complete),
    .fifo_wr        (fifo_wr),
    .fifo_full      (fifo_full),
    .fifo_empty     (fifo_empty),
    .playing        (playing),
    .underrun       (underrun)
  );
  assign usb_wr     = 1'b1;
  assign usb_status = {underrun, playing, sample_complete, fifo_wr};

  coeff_full u_coeffs (
    .clk         (clock_36mhz),
    .rst         (rst_a),
    .ready       (ready),
    .coord       (acoord),
    .coefs       (coefs),
    .coeffs_valid(coeffs_valid)
  );

  for (genvar i = 0; i < NUM_SRC; i++) begin : g_enc
    enc_multiplier u_enc (
      .clk          (clock_36mhz),
      .rst          (rst_a),
      .ready        (ready),
      .c_valid      (coeffs_valid),
      .sample       (audio_data[i]),
      .coefs        (coefs[i]),
      .e            (enc[i]),
      .encoder_valid(enc_valid[i])
    );
  end

  summing u_sum (
    .clk          (clock_36mhz),
    .rst          (rst_a),
    .ready        (ready),
    .enc          (enc),
    .enc_valid    (enc_valid),
    .sum          (mix),
    .summing_valid(summing_valid)
  );

  decoder #(.X( 6'sd31), .Y( 6'sd31), .Z(5'sd0)) u_dec0 (
    .clk(clock_36mhz), .rst(rst_a), .ready(ready), .s(mix), .summing_valid(summing_valid),
    .audio_out(chan[0]), .decoder_valid(dec_valid[0]));
  decoder #(.X( 6'sd31), .Y(-6'sd31), .Z(5'sd0)) u_dec1 (
    .clk(clock_36mhz), .rst(rst_a), .ready(ready), .s(mix), .summing_valid(summing_valid),
    .audio_out(chan[1]), .decoder_valid(dec_valid[1]));
  decoder #(.X(-6'sd31), .Y( 6'sd31), .Z(5'sd0)) u_dec2 (
    .clk(clock_36mhz), .rst(rst_a), .ready(ready), .s(mix), .summing_valid(summing_valid),
    .audio_out(chan[2]), .decoder_valid(dec_valid[2]));
  decoder #(.X(-6'sd31), .Y(-6'sd31), .Z(5'sd0)) u_dec3 (
    .clk(clock_36mhz), .rst(rst_a), .ready(ready), .s(mix), .summing_valid(summing_valid),
    .audio_out(chan[3]), .decoder_valid(dec_valid[3]));

  // On the ready pulse, hand finished audio to the DAC driver.
  always_ff @(posedge clock_36mhz) begin
    if (rst_a) begin
      to_pcm <= '0;
    end else if (ready && &dec_valid) begin
      to_pcm[0] <= {chan[0], chan[1]};
      to_pcm[1] <= {chan[2], chan[3]};
      to_pcm[2] <= {audio_data[0], enc[0][0]};
      to_pcm[3] <= {mix[0], chan[0]};
    end
  end

  pcm1681_driver u_pcm (
    .clk        (clock_36mhz),
    .rst        (rst_a),
    .audio      (to_pcm),
    .sclk       (pcm_sclk),
    .bclk       (pcm_bclk),
    .lrclk      (pcm_lrclk),
    .serial_data(pcm_data),
    .fmt        (pcm_fmt),
    .demp       (pcm_demp),
    .mute       (pcm_mute),
    .ready      (ready)
  );

  second_notify u_led_full (
    .clock(clock_36mhz), .reset(rst_a), .trigger(fifo_full), .second(led_buffer_full));
  second_notify u_led_empty (
    .clock(clock_36mhz), .reset(rst_a), .trigger(fifo_empty), .second(led_buffer_empty));

endmodule
