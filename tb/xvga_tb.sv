// xvga_tb: runs three frames and, over the last two, checks the line
// length (1344 clocks), the frame height (806 lines), the visible area
// (1024 x 768 unblanked pixels per frame), the hsync pulse (136 clocks low,
// seen from hcount 1048 because the output is registered) and the vsync
// pulse (6 lines low).
module xvga_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset = 1'b1;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank;

  xvga dut (.vclock(clk), .reset(reset), .hcount(hcount), .vcount(vcount), .hsync(hsync),
            .vsync(vsync), .blank(blank));

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int visible, hs_low, hs_start, vs_low_lines, lines, max_h;
    logic hs_q, vs_q;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    // skip to the start of a frame
    @(posedge clk iff (hcount == 0 && vcount == 0));
    for (int f = 0; f < 3; f++) begin
      visible = 0; vs_low_lines = 0; lines = 0; max_h = 0;
      hs_q = hsync; vs_q = vsync;
      do begin
        @(posedge clk);
        #1;
        if (int'(hcount) > max_h) max_h = int'(hcount);
        if (!blank) visible++;
        if (hcount == 0) lines++;
        if (!hsync && hs_q) begin hs_low = 0; hs_start = int'(hcount); end
        if (!hsync) hs_low++;
        if (hsync && !hs_q) begin
          checks++;
          if (hs_low != 136 || hs_start != 1048) begin
            failures++;
            if (failures < 5) $display("FAIL hsync low %0d from %0d", hs_low, hs_start);
          end
        end
        if (!vsync && hcount == 0) vs_low_lines++;
        hs_q = hsync; vs_q = vsync;
      end while (!(hcount == 0 && vcount == 0));
      if (f == 0) continue;  // the first pass starts mid-pixel after reset
      checks++;
      if (max_h != 1343) begin failures++; $display("FAIL line length %0d", max_h + 1); end
      checks++;
      if (lines != 806) begin failures++; $display("FAIL lines %0d", lines); end
      checks++;
      if (visible != 1024 * 768) begin failures++; $display("FAIL visible %0d", visible); end
      checks++;
      if (vs_low_lines != 6) begin failures++; $display("FAIL vsync lines %0d", vs_low_lines); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
