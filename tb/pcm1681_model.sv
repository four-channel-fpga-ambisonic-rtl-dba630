// pcm1681_model: behavioural model of the serial audio input of a PCM1681
// DAC in 16-bit left-justified mode, for simulation only.
//
// On each rising bclk edge it samples lrclk and the four data lines. A
// change of lrclk starts a channel (high = left, low = right); the first
// 16 bits after it are shifted in MSB first. When a right channel completes,
// the four stereo words are published on left/right and frames counts up.
module pcm1681_model (
  input  logic             bclk,
  input  logic             lrclk,
  input  logic [3:0]       sdata,
  output logic [3:0][15:0] left,
  output logic [3:0][15:0] right,
  output int               frames,
  output int               bit_errors
);

  logic             lr_q = 1'b0;
  int               nbit = 99;
  logic [3:0][15:0] shreg;

  initial begin
    frames     = 0;
    bit_errors = 0;
    left       = '0;
    right      = '0;
  end


  always @(posedge bclk) begin
    if (lrclk != lr_q) begin
      nbit = 0;
      lr_q <= lrclk;
    end
    if (nbit < 16) begin
      for (int l = 0; l < 4; l++) shreg[l] = {shreg[l][14:0], sdata[l]};
      nbit++;
      if (nbit == 16) begin
        if (lrclk) left = shreg;
        else begin
          right = shreg;
          frames++;
        end
      end
    end else if (sdata != 4'b0000) begin
      bit_errors++;   // data lines must be zero outside the 16 data bits
    end
  end

endmodule
