// second_notify_tb: a single trigger must light the output for exactly
// 2**TIME_WIDTH - 1 clocks; a trigger while lit restarts the interval.
module second_notify_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int TW = 6;
  logic reset = 1'b1, trigger = 1'b0, second;

  second_notify #(.TIME_WIDTH(TW)) dut (.clock(clk), .reset(reset), .trigger(trigger), .second(second));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int retrig_at, input int expect_len);
    int len;
    @(negedge clk);
    trigger = 1'b1;
    @(negedge clk);
    trigger = 1'b0;
    len = 0;
    while (second && len < 1000) begin
      len++;
      if (len == retrig_at) begin
        trigger = 1'b1;
        @(negedge clk);
        trigger = 1'b0;
        len++;
      end else begin
        @(negedge clk);
      end
    end
    checks++;
    if (len != expect_len) begin failures++; $display("FAIL lit for %0d, expected %0d", len, expect_len); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (second) failures++;
    for (int i = 0; i < 5; i++) measure(0, (1 << TW) - 1);
    measure(10, 10 + (1 << TW));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
