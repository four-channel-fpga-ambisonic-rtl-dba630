// preset_manager: source positions, presets and smooth movement.
//
// Two memories hold the x and y coordinate (signed 6-bit units) of every
// virtual source in every preset. The active preset is chosen by the four
// preset buttons (button 0 wins if several are pressed) and takes effect at
// once. Once per video frame (update pulse) each source whose select switch
// is on is moved one unit by the up/down/left/right buttons in the active
// preset, limited to COORD_MIN..COORD_MAX; up decreases y (screen up).
//
// The coordinates published to the display and to the audio system are a
// separate set of registers that step one unit per frame and per axis toward
// the active preset's stored values, so switching presets glides the
// sources instead of jumping.
//
// Interface: all inputs are synchronous, debounced levels except update, a
// one-cycle pulse. coord[i] = {x, y, z = 0}. Reset puts every source of
// every preset, and the published positions, at the origin.
//
// The memories, the switch-per-source editing and the interpolation follow
// the system description; the edit limits come from the original button
// handling. Here the published value converges exactly on the stored one.
module preset_manager
  import ambi_pkg::*;
#(
  parameter int COORD_MIN = -16,
  parameter int COORD_MAX = 15
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 update,
  input  logic [3:0]           preset_btn,
  input  logic [NUM_SRC-1:0]   src_sel,
  input  logic                 up,
  input  logic                 down,
  input  logic                 left,
  input  logic                 right,
  output coord_t [NUM_SRC-1:0] coord,
  output logic [1:0]           active_preset
);

  typedef logic signed [5:0] unit_t;

  unit_t x_mem [NUM_SRC][4];
  unit_t y_mem [NUM_SRC][4];
  unit_t cur_x [NUM_SRC];
  unit_t cur_y [NUM_SRC];

  function automatic unit_t step_toward(unit_t cur, unit_t target);
    if (cur < target) return cur + 6'sd1;
    if (cur > target) return cur - 6'sd1;
    return cur;
  endfunction

  always_ff @(posedge clk) begin
    if (reset)              active_preset <= 2'd0;
    else if (preset_btn[0]) active_preset <= 2'd0;
    else if (preset_btn[1]) active_preset <= 2'd1;
    else if (preset_btn[2]) active_preset <= 2'd2;
    else if (preset_btn[3]) active_preset <= 2'd3;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int s = 0; s < NUM_SRC; s++) begin
        for (int p = 0; p < 4; p++) begin
          x_mem[s][p] <= '0;
          y_mem[s][p] <= '0;
        end
        cur_x[s] <= '0;
        cur_y[s] <= '0;
      end
    end else if (update) begin
      for (int s = 0; s < NUM_SRC; s++) begin
        if (src_sel[s]) begin
          if (up    && y_mem[s][active_preset] > 6'(COORD_MIN))
            y_mem[s][active_preset] <= y_mem[s][active_preset] - 6'sd1;
          if (down  && y_mem[s][active_preset] < 6'(COORD_MAX))
            y_mem[s][active_preset] <= y_mem[s][active_preset] + 6'sd1;
          if (left  && x_mem[s][active_preset] > 6'(COORD_MIN))
            x_mem[s][active_preset] <= x_mem[s][active_preset] - 6'sd1;
          if (right && x_mem[s][active_preset] < 6'(COORD_MAX))
            x_mem[s][active_preset] <= x_mem[s][active_preset] + 6'sd1;
        end
        cur_x[s] <= step_toward(cur_x[s], x_mem[s][active_preset]);
        cur_y[s] <= step_toward(cur_y[s], y_mem[s][active_preset]);
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NUM_SRC; s++) coord[s] = '{x: cur_x[s], y: cur_y[s], z: 5'sd0};
  end

endmodule
