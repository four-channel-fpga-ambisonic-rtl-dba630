// pcm1681_driver: clocks, serial audio and control pins for a TI PCM1681
// eight-channel DAC.
//
// Everything is derived from the 36.864 MHz audio clock by one frame counter
// (0..FRAME-1, FRAME = 768 cycles = one 48 kHz sample period), so the three
// DAC clocks are mutually synchronous and come straight from flip-flops:
//   sclk  = clock / 4  (192 fs, 9.216 MHz)  - DAC system clock
//   bclk  = clock / 16 (48 fs, 2.304 MHz)   - bit clock, 48 per frame
//   lrclk = clock / 768 (fs, 48 kHz)        - high = left, low = right
// lrclk rises and falls on falling edges of bclk, and the data lines change
// on falling bclk edges, so the DAC latches each bit on the rising edge in
// the middle of the bit.
//
// Format: left-justified, 16 bits, MSB first. Each half frame of lrclk has
// 24 bit clocks; the 16 data bits go out on the first 16 of them and the
// line is zero for the remaining 8. Four data lines carry two channels
// each: audio[i] = {left[15:0], right[15:0]} for line i.
//
// Interface: the four words are sampled one clock before the frame starts
// and sent during the following frame. ready is a one-cycle pulse at the
// start of every frame (rising edge of lrclk); it paces the whole audio
// system. fmt, demp and mute drive the DAC's parallel control pins as
// constants.
//
// Counter dividers and the format follow the system description; using a
// single frame counter and clock-enable style logic (no logic clocked by
// the generated bclk) is this design's choice.
module pcm1681_driver #(
  parameter int         FRAME     = 768,   // system clocks per sample period
  parameter int         BCLK_DIV  = 16,    // system clocks per bclk period
  parameter int         SCLK_DIV  = 4,     // system clocks per sclk period
  parameter int         BITS      = 16,    // data bits per channel
  parameter logic [1:0] FMT       = 2'b10, // format pins as wired on the board
  parameter logic       DEMP      = 1'b0,  // de-emphasis off
  parameter logic       MUTE      = 1'b0   // not muted
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0][31:0] audio,
  output logic             sclk,
  output logic             bclk,
  output logic             lrclk,
  output logic [3:0]       serial_data,
  output logic [1:0]       fmt,
  output logic             demp,
  output logic             mute,
  output logic             ready
);

  localparam int CW         = $clog2(FRAME);
  localparam int HALF_SLOTS = FRAME / BCLK_DIV / 2;   // 24 bclk per channel

  logic [CW-1:0]    phase, phase_next;
  logic [3:0][31:0] words;
  int unsigned      slot;

  assign phase_next = (phase == CW'(FRAME - 1)) ? '0 : phase + 1'b1;
  assign slot       = 32'(phase_next) / BCLK_DIV;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase       <= CW'(FRAME - 1);
      sclk        <= 1'b0;
      bclk        <= 1'b0;
      lrclk       <= 1'b0;
      ready       <= 1'b0;
      serial_data <= '0;
      words       <= '0;
    end else begin
      phase <= phase_next;
      sclk  <= (32'(phase_next) % SCLK_DIV) >= SCLK_DIV / 2;
      bclk  <= (32'(phase_next) % BCLK_DIV) >= BCLK_DIV / 2;
      lrclk <= 32'(phase_next) < FRAME / 2;
      ready <= (phase_next == '0);
      if (phase_next == CW'(FRAME - 1)) words <= audio;
      for (int l = 0; l < 4; l++) begin
        if (slot < BITS)
          serial_data[l] <= words[l][31 - slot];
        else if (slot >= HALF_SLOTS && slot < HALF_SLOTS + BITS)
          serial_data[l] <= words[l][15 - (slot - HALF_SLOTS)];
        else
          serial_data[l] <= 1'b0;
      end
    end
  end

  assign fmt  = FMT;
  assign demp = DEMP;
  assign mute = MUTE;

endmodule
