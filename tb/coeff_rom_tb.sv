// coeff_rom_tb: checks every ROM word of all eleven harmonic ROMs against
// the trigonometric reference (within 1 LSB), and the one-clock read
// latency.
module coeff_rom_tb;
  import ambi_pkg::*;
  import ambi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [ROM_ADDR_W-1:0] addr = '0;
  coef_t data [NUM_ROMS];

  for (genvar r = 0; r < NUM_ROMS; r++) begin : g_rom
    coeff_rom #(.HARM(ROM_HARM[r])) dut (.clk(clk), .addr(addr), .data(data[r]));
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**ROM_ADDR_W; a++) begin
      logic signed [5:0] xs, ys;
      addr = ROM_ADDR_W'(a);
      xs = addr[11:6];
      ys = addr[5:0];
      @(posedge clk);
      #1;
      for (int r = 0; r < NUM_ROMS; r++) begin
        int exp_v, got;
        exp_v = rom_ref(ROM_HARM[r], int'(xs), int'(ys));
        got   = int'(data[r]);
        checks++;
        if (iabs(got - exp_v) > 1) begin
          failures++;
          if (failures < 10)
            $display("FAIL h=%0d (%0d,%0d): got %0d exp %0d", ROM_HARM[r], xs, ys, got, exp_v);
        end
      end
      // the word must not change before the next clock edge
      addr = ~addr;
      #1;
      checks++;
      if (int'(data[0]) != rom_ref(0, int'(xs), int'(ys)) &&
          iabs(int'(data[0]) - rom_ref(0, int'(xs), int'(ys))) > 1) failures++;
      @(negedge clk);
    end
    // spot values: W at the origin = 0.96/sqrt(2), V at 45 degrees radius 20.
    checks++;
    if (iabs(rom_ref(0, 0, 0) - 22243) > 1) begin failures++; $display("FAIL W(0,0)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
