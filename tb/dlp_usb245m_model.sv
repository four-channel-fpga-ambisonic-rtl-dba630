// dlp_usb245m_model: behavioural model of the receive side of a DLP-USB245M
// USB FIFO chip, for simulation only (not synthesizable).
//
// The host stream is generated, not stored: byte n belongs to frame n/8,
// channel (n/2)%4, low byte first; the 16-bit sample value is given by
// sample_value(frame, channel), which testbenches call to know what to
// expect. RXF# is low while a byte is waiting. A falling RD# puts the
// byte on the data pins one clock later; a rising RD# consumes it, and RXF#
// then stays high for RECOVER clocks (the chip fetching the next byte)
// before going low again, and stays high for as long as the host has paused
// (pause = 1) or the
// stream limit (limit bytes, 0 = no limit) is reached. rst restarts the
// stream at byte 0.
module dlp_usb245m_model #(
  parameter int RECOVER = 3
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rd_n,
  input  logic       pause,
  input  int         limit,
  output logic       rxf_n,
  output logic [7:0] data,
  output int         sent
);

  logic rd_n_q = 1'b1;
  int   rec    = 0;

  function automatic logic [15:0] sample_value(int frame, int ch);
    return 16'((frame * 1237 + ch * 9001) ^ (ch << 13)) ^ 16'(frame * frame * 7);
  endfunction

  function automatic logic [7:0] stream_byte(int n);
    logic [15:0] s;
    s = sample_value(n / 8, (n / 2) % 4);
    return (n % 2 == 0) ? s[7:0] : s[15:8];
  endfunction

  initial begin
    rxf_n = 1'b1;
    data  = 8'h00;
    sent  = 0;
  end

  always @(posedge clk) begin
    rd_n_q <= rd_n;
    if (rst) begin
      sent  <= 0;
      rxf_n <= 1'b1;
      rec   <= 0;
    end else begin
    if (rd_n_q && !rd_n) data <= stream_byte(sent);
    if (!rd_n_q && rd_n) begin
      sent  <= sent + 1;
      rxf_n <= 1'b1;
      rec   <= RECOVER;
    end else if (rec > 0) begin
      rec <= rec - 1;
    end else if (rd_n) begin
      if (!pause && !(limit != 0 && sent >= limit)) rxf_n <= 1'b0;
    end
    end
  end

endmodule
