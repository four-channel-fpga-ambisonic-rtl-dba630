// enc_multiplier: ambisonic encoder for one virtual source.
//
// Scales the source's mono sample by its 16 harmonic coefficients, producing
// the 16-channel encoded stream. One multiplier is shared by all harmonics:
// a counter steps through them, one product per clock. Each product is
// 16x16 -> 32 bits and only its 16 most significant bits are kept, which is
// valid because every coefficient lies in [-1, 1).
//
// Handshake: ready (the 48 kHz audio pulse) clears the encoder. Once c_valid
// is high the counter runs 0..15; the operands are registered (multiplier
// input stage), the product is written to the output bank the next cycle,
// and encoder_valid rises one cycle after the last write. It stays high,
// with e[] stable, until the next ready.
//
// Timing: encoder_valid is first high ENC_LATENCY = 19 cycles after the
// first cycle in which c_valid is high (1 start + 16 issues + 1 write + 1
// delay). The sample must be stable from c_valid until encoder_valid.
//
// The shared multiplier, the counter, the 16-MSB truncation and the one-
// cycle delay on encoder_valid follow the system description; the state
// machine that sequences them is this design's.
module enc_multiplier
  import ambi_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ready,
  input  logic    c_valid,
  input  sample_t sample,
  input  cvec_t   coefs,
  output hvec_t   e,
  output logic    encoder_valid
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_DONE} state_t;

  state_t     state;
  logic [3:0] m_counter;
  sample_t    op_a;
  coef_t      op_b;
  logic [3:0] op_idx;
  logic       op_vld;
  logic signed [2*SAMPLE_W-1:0] q;

  assign q = op_a * op_b;

  always_ff @(posedge clk) begin
    if (rst || ready) begin
      state         <= S_IDLE;
      m_counter     <= '0;
      op_vld        <= 1'b0;
      encoder_valid <= 1'b0;
    end else begin
      op_vld <= 1'b0;
      unique case (state)
        S_IDLE: if (c_valid) state <= S_RUN;
        S_RUN: begin
          op_a      <= sample;
          op_b      <= coefs[m_counter];
          op_idx    <= m_counter;
          op_vld    <= 1'b1;
          m_counter <= m_counter + 4'd1;
          if (m_counter == 4'd15) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_DONE;         // last product is written this cycle
        S_DONE:  encoder_valid <= 1'b1;   // one cycle after the last write
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) e <= '0;
    else if (op_vld) e[op_idx] <= q[2*SAMPLE_W-1 -: SAMPLE_W];
  end

endmodule
