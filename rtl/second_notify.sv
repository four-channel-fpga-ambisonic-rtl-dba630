// second_notify: stretches a one-cycle event into a visible LED pulse.
//
// A trigger starts (or restarts) a TIME_WIDTH-bit counter; the output is
// high while the counter is running and drops when it wraps to zero. With
// the default width and a 36.864 MHz clock a single event lights the LED
// for about 0.45 s; events that repeat keep it lit.
module second_notify #(
  parameter int TIME_WIDTH = 24
) (
  input  logic clock,
  input  logic reset,
  input  logic trigger,
  output logic second
);

  logic [TIME_WIDTH-1:0] counter;

  always_ff @(posedge clock) begin
    if (reset)               counter <= '0;
    else if (trigger)        counter <= TIME_WIDTH'(1);
    else if (counter != '0)  counter <= counter + 1'b1;
  end

  assign second = (counter != '0);

endmodule
