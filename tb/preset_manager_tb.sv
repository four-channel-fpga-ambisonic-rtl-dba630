// preset_manager_tb: random button, switch and preset activity against a
// reference model of the preset memories and of the interpolated outputs.
// Counts edits, clamps at the limits, preset switches and glide steps, and
// fails if any of them never happened.
module preset_manager_tb;
  import ambi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset = 1'b1, update = 1'b0, up = 0, down = 0, left = 0, right = 0;
  logic [3:0] btn = '0, sel = '0;
  coord_t [3:0] coord;
  logic [1:0] ap;

  preset_manager dut (.clk(clk), .reset(reset), .update(update), .preset_btn(btn), .src_sel(sel),
    .up(up), .down(down), .left(left), .right(right), .coord(coord), .active_preset(ap));

  int mx [4][4], my [4][4], cx [4], cy [4], act;
  int edits = 0, clamps = 0, switches = 0, glides = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int p = 0; p < 4; p++) begin mx[s][p] = 0; my[s][p] = 0; end
      cx[s] = 0; cy[s] = 0;
    end
    act = 0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // preset buttons occasionally
      btn = ($urandom_range(0, 40) == 0) ? 4'($urandom) : 4'b0;
      sel = 4'($urandom);
      // long runs in one direction so the limits are reached
      up    = ((t / 300) % 4 == 0) && $urandom_range(0, 1);
      down  = ((t / 300) % 4 == 1) && $urandom_range(0, 1);
      left  = ((t / 300) % 4 == 2) && $urandom_range(0, 1);
      right = ((t / 300) % 4 == 3) && $urandom_range(0, 1);
      if (t % 7 == 0) begin up = 0; down = 0; left = 0; right = 0; end
      update = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      // reference model of the clock edge just taken
      begin
        int na;
        na = btn[0] ? 0 : btn[1] ? 1 : btn[2] ? 2 : btn[3] ? 3 : act;
        if (update) begin
          // the glide targets are the stored values before this edge's edits
          for (int s = 0; s < 4; s++) begin
            int tx, ty;
            tx = mx[s][act];
            ty = my[s][act];
            if (cx[s] != tx || cy[s] != ty) glides++;
            cx[s] += (cx[s] < tx) ? 1 : (cx[s] > tx) ? -1 : 0;
            cy[s] += (cy[s] < ty) ? 1 : (cy[s] > ty) ? -1 : 0;
          end
          for (int s = 0; s < 4; s++) begin
            if (sel[s]) begin
              if (up)    begin if (my[s][act] > -16) begin my[s][act]--; edits++; end else clamps++; end
              if (down)  begin if (my[s][act] <  15) begin my[s][act]++; edits++; end else clamps++; end
              if (left)  begin if (mx[s][act] > -16) begin mx[s][act]--; edits++; end else clamps++; end
              if (right) begin if (mx[s][act] <  15) begin mx[s][act]++; edits++; end else clamps++; end
            end
          end
        end
        if (na != act) switches++;
        act = na;
      end
      #1;
      checks++;
      if (int'(ap) != act) begin failures++; $display("FAIL active preset"); end
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (int'(coord[s].x) != cx[s] || int'(coord[s].y) != cy[s] || coord[s].z != 5'd0) begin
          failures++;
          if (failures < 10) $display("FAIL src %0d at t=%0d: got (%0d,%0d) exp (%0d,%0d)", s, t,
                                      coord[s].x, coord[s].y, cx[s], cy[s]);
        end
      end
    end
    $display("preset_manager_tb: edits=%0d clamps=%0d switches=%0d glides=%0d", edits, clamps, switches, glides);
    checks++;
    if (edits == 0 || clamps == 0 || switches == 0 || glides == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
