// byte_fifo_tb: random simultaneous reads and writes against a queue model,
// with phases that fill the buffer to full (checking that all 2**LOGSIZE
// entries are usable, that a write when full is dropped and raises
// overflow) and drain it to empty.
module byte_fifo_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LOGSIZE = 4;
  logic rst = 1'b1, wr = 1'b0, rd = 1'b0;
  logic [7:0] din = '0, dout;
  logic full, empty, overflow;
  logic [7:0] q [$];
  int   full_seen = 0, ovf_seen = 0;

  byte_fifo #(.LOGSIZE(LOGSIZE), .WIDTH(8)) dut (
    .clk(clk), .rst(rst), .wr(wr), .din(din), .rd(rd), .dout(dout),
    .full(full), .empty(empty), .overflow(overflow));

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 20000; t++) begin
      int phase, pw, pre;
      phase = (t / 500) % 3;           // 0: mixed, 1: mostly write, 2: mostly read
      pw    = (phase == 1) ? 90 : (phase == 2) ? 10 : 50;
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == (1 << LOGSIZE))) begin
        failures++;
        if (failures < 10) $display("FAIL flags size=%0d empty=%b full=%b", q.size(), empty, full);
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; if (failures < 10) $display("FAIL data"); end
      end
      if (full) full_seen++;
      wr  = ($urandom_range(0, 99) < pw);
      rd  = ($urandom_range(0, 99) >= pw);
      din = 8'($urandom);
      @(posedge clk);
      #1;
      pre = q.size();
      if (rd && q.size() > 0) void'(q.pop_front());
      if (wr) begin
        if (pre < (1 << LOGSIZE)) q.push_back(din);
        else begin
          ovf_seen++;
          checks++;
          if (!overflow) begin failures++; $display("FAIL overflow flag"); end
        end
      end
    end
    checks++;
    if (full_seen == 0 || ovf_seen == 0) begin failures++; $display("FAIL full/overflow never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
