// summing: mixes the encoded streams of all virtual sources.
//
// For each of the 16 harmonics the four encoder outputs are added into an
// 18-bit signed sum, which is shifted right arithmetically by two so the
// mixed stream keeps the 16-bit sample width (a divide by the number of
// sources, so the mix can never overflow).
//
// Handshake: ready clears summing_valid. When every encoder_valid input is
// high the sums are registered and summing_valid rises on the same edge,
// i.e. one clock after the encoders are all valid (SUM_LATENCY = 1). The
// outputs then hold until the next ready.
//
// The widths, the shift and the one-cycle latency follow the system
// description; registering the sums (rather than adding combinationally in
// front of the decoders) is this design's choice.
module summing
  import ambi_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                ready,
  input  hvec_t [NUM_SRC-1:0] enc,
  input  logic  [NUM_SRC-1:0] enc_valid,
  output hvec_t               sum,
  output logic                summing_valid
);

  localparam int ACC_W = SAMPLE_W + $clog2(NUM_SRC);

  hvec_t sum_d;

  always_comb begin
    for (int h = 0; h < NUM_HARM; h++) begin
      logic signed [ACC_W-1:0] acc;
      acc = '0;
      for (int s = 0; s < NUM_SRC; s++) acc += ACC_W'(enc[s][h]);
      sum_d[h] = sample_t'(acc >>> $clog2(NUM_SRC));
    end
  end

  always_ff @(posedge clk) begin
    if (rst || ready) begin
      summing_valid <= 1'b0;
    end else if (&enc_valid && !summing_valid) begin
      sum           <= sum_d;
      summing_valid <= 1'b1;
    end
  end

endmodule
