// byte_fifo: synchronous first-in first-out buffer for USB bytes.
//
// 2**LOGSIZE entries of WIDTH bits (default 4096 bytes). Pointers carry one
// extra bit so a completely full buffer is told apart from an empty one and
// all 2**LOGSIZE entries are usable. The head entry is always visible on
// dout (first-word fall-through), so a read strobe takes it and the next
// entry appears on the following cycle.
//
// Interface: wr stores din unless the buffer is full (the write is dropped
// and overflow is set until the next read); rd removes the head unless the
// buffer is empty. Reads and writes may happen in the same cycle.
// reset is synchronous and empties the buffer.
module byte_fifo #(
  parameter int LOGSIZE = 12,
  parameter int WIDTH   = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr,
  input  logic [WIDTH-1:0] din,
  input  logic             rd,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [2**LOGSIZE];
  logic [LOGSIZE:0] wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[LOGSIZE] != rptr[LOGSIZE]) &&
                 (wptr[LOGSIZE-1:0] == rptr[LOGSIZE-1:0]);
  assign dout  = mem[rptr[LOGSIZE-1:0]];
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[LOGSIZE-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      if (wr && full)  overflow <= 1'b1;
      else if (do_rd)  overflow <= 1'b0;
    end
  end

endmodule
