// decoder: ambisonic decoder for one loudspeaker.
//
// Projects the mixed 16-harmonic stream onto the speaker's own harmonic
// vector. The speaker position is given by the parameters X, Y, Z; its
// coefficients come from a coeff_static table. One shared multiplier forms
// sum[k] * coef[k] for k = 0..15, one per clock, keeping the 16 MSBs of each
// 32-bit product in a 16-entry memory. When all products are in, the memory
// is summed (20-bit accumulator) and the low 16 bits become the speaker
// sample.
//
// Handshake: ready clears the decoder. Once summing_valid is high the
// counter runs; decoder_valid rises together with the new audio_out,
// DEC_LATENCY = 19 cycles after the first cycle of summing_valid (1 start +
// 16 issues + 1 write + 1 sum). audio_out then holds until the next result.
//
// Truncating the 20-bit sum to its low 16 bits, as the system description
// does, wraps rather than saturates on overflow; with the gains used the sum
// stays in range for full-scale inputs at a single source.
module decoder
  import ambi_pkg::*;
#(
  parameter logic signed [5:0] X = 6'sd31,
  parameter logic signed [5:0] Y = 6'sd31,
  parameter logic signed [4:0] Z = 5'sd0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ready,
  input  hvec_t   s,
  input  logic    summing_valid,
  output sample_t audio_out,
  output logic    decoder_valid
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_SUM} state_t;

  cvec_t      c;
  logic       c_valid;
  state_t     state;
  logic [3:0] m_counter;
  sample_t    op_a;
  coef_t      op_b;
  logic [3:0] op_idx;
  logic       op_vld;
  hvec_t      mo;
  logic signed [2*SAMPLE_W-1:0] q;
  logic signed [SAMPLE_W+3:0]   decoder_result;

  coeff_static u_coeffs (
    .coord       ('{x: X, y: Y, z: Z}),
    .coefs       (c),
    .coeffs_valid(c_valid)
  );

  assign q = op_a * op_b;

  always_comb begin
    decoder_result = '0;
    for (int k = 0; k < NUM_HARM; k++) decoder_result += (SAMPLE_W+4)'(mo[k]);
  end

  always_ff @(posedge clk) begin
    if (rst || ready) begin
      state         <= S_IDLE;
      m_counter     <= '0;
      op_vld        <= 1'b0;
      decoder_valid <= 1'b0;
    end else begin
      op_vld <= 1'b0;
      unique case (state)
        S_IDLE: if (summing_valid && c_valid) state <= S_RUN;
        S_RUN: begin
          op_a      <= s[m_counter];
          op_b      <= c[m_counter];
          op_idx    <= m_counter;
          op_vld    <= 1'b1;
          m_counter <= m_counter + 4'd1;
          if (m_counter == 4'd15) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_SUM;
        S_SUM:   decoder_valid <= 1'b1;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) mo <= '0;
    else if (op_vld) mo[op_idx] <= q[2*SAMPLE_W-1 -: SAMPLE_W];
  end

  always_ff @(posedge clk) begin
    if (rst) audio_out <= '0;
    else if (state == S_SUM && !decoder_valid && !ready) audio_out <= sample_t'(decoder_result);
  end

endmodule
