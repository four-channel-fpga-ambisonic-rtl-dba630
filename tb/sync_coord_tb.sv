// sync_coord_tb: random coordinate words; checks each appears on acoord
// on the third audio clock edge after it was applied.
module sync_coord_tb;
  import ambi_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  coord_t v = '0, a;
  coord_t hist [$];

  sync_coord dut (.clk(clk), .vcoord(v), .acoord(a));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      v = coord_t'($urandom);
      hist.push_back(v);
      @(posedge clk);
      #1;
      if (hist.size() >= 3) begin
        checks++;
        if (a !== hist[hist.size() - 3]) begin failures++; $display("FAIL at %0d", t); end
      end
      if (hist.size() > 8) void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
