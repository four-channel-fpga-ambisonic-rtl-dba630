// sync_coord: carries a source coordinate from the video clock domain into
// the audio clock domain.
//
// The word passes through STAGES (default 3) flip-flop layers clocked by the
// audio clock. The coordinate changes at most once per video frame and by
// one unit per axis, far slower than the synchronizer settles, so a
// transitional value is seen for at most one audio clock and the audio
// pipeline re-reads the coordinate only on its 48 kHz ready pulse.
//
// Latency: STAGES audio clocks.
module sync_coord
  import ambi_pkg::*;
#(
  parameter int STAGES = 3
) (
  input  logic   clk,     // audio clock
  input  coord_t vcoord,  // from the video domain
  output coord_t acoord
);

  coord_t sync_q [STAGES];

  always_ff @(posedge clk) begin
    sync_q[0] <= vcoord;
    for (int i = 1; i < STAGES; i++) sync_q[i] <= sync_q[i-1];
  end

  assign acoord = sync_q[STAGES-1];

endmodule
