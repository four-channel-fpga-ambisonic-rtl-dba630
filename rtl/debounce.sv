// debounce: clean level from a bouncing push button.
//
// The output follows the input only after the input has held the same
// value for DELAY consecutive clocks; any change restarts the count. At
// 65 MHz the default of 270000 clocks is about 4 ms. Reset copies the input
// straight to the output.
module debounce #(
  parameter int DELAY = 270000
) (
  input  logic clock,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  localparam int CW = $clog2(DELAY + 1);

  logic [CW-1:0] count;
  logic          last;

  always_ff @(posedge clock) begin
    if (reset) begin
      count <= '0;
      last  <= noisy;
      clean <= noisy;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CW'(DELAY)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
