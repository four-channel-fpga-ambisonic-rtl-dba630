// usb_reader: audio input from a DLP-USB245M USB FIFO chip.
//
// Two independent machines share a byte buffer (byte_fifo):
//
// USB side - an 8-state machine pulls one byte per pass from the chip.
// States 0..7 are IDLE, DATA_AVAILABLE, WAIT_READ_1, WAIT_READ_2, READ_BYTE,
// BYTE_INC, DONE and WAIT. The chip's RD# pin is the state's MSB, so RD# is
// low (read strobe active) during the first four states and high during the
// last four; being a single flip-flop output it cannot glitch. fifo_wr is
// registered from state DATA_AVAILABLE, so the byte on the data pins is
// written to the buffer at the end of the third state, two cycles before
// RD# returns high. In states 0..6 the machine advances only while RXF#
// stays low (data available), otherwise it abandons the pass; WAIT (7)
// holds RD# high until RXF# is low again and the buffer has room.
//
// Audio side - bytes are popped from the buffer into an 8-byte frame
// (CHANNELS x SAMPLE_BYTES, little-endian, channel 0 first). Playback is
// gated: after reset, or whenever the buffer runs empty, nothing is taken
// until the buffer has filled completely, which rides out gaps in the USB
// stream. On each ready pulse a complete frame is published on audio_out
// and assembly of the next one starts; if the frame is not complete
// (underrun) audio_out keeps its last value.
//
// RXF# is passed through a two-flop synchronizer before the state machine
// sees it (this design's choice; the chip's handshake is asynchronous).
// The buffer size, the state encoding, the RD# and fifo_wr timing and the
// fill-before-play rule follow the system description.
module usb_reader
  import ambi_pkg::*;
#(
  parameter int SAMPLE_BYTES = 2,
  parameter int CHANNELS     = 4,
  parameter int FIFO_LOGSIZE = 12
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ready,
  // DLP-USB245M pins
  input  logic                   rxf_n,
  output logic                   rd_n,
  input  logic [7:0]             data,
  // audio frame
  output sample_t [CHANNELS-1:0] audio_out,
  // status
  output logic                   sample_complete,
  output logic                   fifo_wr,
  output logic                   fifo_full,
  output logic                   fifo_empty,
  output logic                   playing,
  output logic                   underrun
);

  localparam int FRAME_BYTES = SAMPLE_BYTES * CHANNELS;
  localparam int BN_W        = $clog2(FRAME_BYTES + 1);

  typedef enum logic [2:0] {
    S_IDLE           = 3'd0,
    S_DATA_AVAILABLE = 3'd1,
    S_WAIT_READ_1    = 3'd2,
    S_WAIT_READ_2    = 3'd3,
    S_READ_BYTE      = 3'd4,
    S_BYTE_INC       = 3'd5,
    S_DONE           = 3'd6,
    S_WAIT           = 3'd7
  } usb_state_t;

  usb_state_t state, next_state;
  logic [1:0] rxf_sync;
  logic       rxf;
  logic       fifo_rd, fifo_overflow;
  logic [7:0] fifo_out;
  logic [BN_W-1:0] byte_num;
  logic [7:0] audio_bits [FRAME_BYTES];

  // ---------------------------------------------------------------- USB side
  always_ff @(posedge clk) begin
    if (rst) rxf_sync <= '0;
    else     rxf_sync <= {rxf_sync[0], ~rxf_n};
  end
  assign rxf = rxf_sync[1];

  always_comb begin
    unique case (state)
      S_WAIT:  next_state = (rxf && !fifo_full) ? S_IDLE : S_WAIT;
      default: next_state = rxf ? usb_state_t'(state + 3'd1) : S_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_WAIT;
      fifo_wr <= 1'b0;
    end else begin
      state   <= next_state;
      fifo_wr <= (state == S_DATA_AVAILABLE) && rxf;
    end
  end

  assign rd_n = state[2];

  byte_fifo #(.LOGSIZE(FIFO_LOGSIZE), .WIDTH(8)) usb_buffer (
    .clk     (clk),
    .rst     (rst),
    .wr      (fifo_wr),
    .din     (data),
    .rd      (fifo_rd),
    .dout    (fifo_out),
    .full    (fifo_full),
    .empty   (fifo_empty),
    .overflow(fifo_overflow)
  );

  // -------------------------------------------------------------- audio side
  assign sample_complete = (byte_num == BN_W'(FRAME_BYTES));
  assign fifo_rd         = playing && !fifo_empty && !sample_complete;

  always_ff @(posedge clk) begin
    if (rst) begin
      playing   <= 1'b0;
      byte_num  <= '0;
      audio_out <= '0;
      underrun  <= 1'b0;
    end else begin
      playing <= fifo_empty ? 1'b0 : fifo_full ? 1'b1 : playing;
      if (fifo_rd) begin
        audio_bits[byte_num[BN_W-2:0]] <= fifo_out;
        byte_num             <= byte_num + 1'b1;
      end
      underrun <= 1'b0;
      if (ready) begin
        if (sample_complete) begin
          for (int c = 0; c < CHANNELS; c++)
            for (int b = 0; b < SAMPLE_BYTES; b++)
              audio_out[c][8*b +: 8] <= audio_bits[c*SAMPLE_BYTES + b];
          byte_num <= '0;
        end else begin
          underrun <= 1'b1;
        end
      end
    end
  end

  // The buffer's overflow flag cannot be set: WAIT only starts a pass when
  // the buffer has room.
  always_ff @(posedge clk) begin
    if (!rst) assert (!fifo_overflow) else $error("usb_reader: byte buffer overflow");
  end

endmodule
