// coeff_rom: coefficient ROM for one ambisonic harmonic.
//
// 4096 words of 16 bits, one per (x, y) source coordinate; the address is
// {x[5:0], y[5:0]} in two's complement, so address 0 is (0, 0). The content is
// the Q1.15 coefficient of harmonic HARM with the head-room and distance
// gains applied (ambi_pkg::rom_coef). Eleven of these, one per non-zero
// harmonic, sit side by side and are read in parallel by coeff_full.
//
// The table is filled by an initial block from the closed-form formula
// rather than from a data file, which keeps a 64 Kbit table out of the
// source tree; a synthesis tool that evaluates initial blocks maps it to a
// block RAM initialised with the same values.
//
// Timing: synchronous read, data one clock after the address (like a block
// RAM with registered output).
module coeff_rom
  import ambi_pkg::*;
#(
  parameter int HARM = 0   // harmonic number 0..15
) (
  input  logic                  clk,
  input  logic [ROM_ADDR_W-1:0] addr,
  output coef_t                 data
);

  coef_t mem [2**ROM_ADDR_W];

  initial begin
    for (int a = 0; a < 2**ROM_ADDR_W; a++) begin
      logic [ROM_ADDR_W-1:0] av;
      logic signed [5:0] xs, ys;
      av = ROM_ADDR_W'(a);
      xs = av[11:6];
      ys = av[5:0];
      mem[a] = rom_coef(HARM, int'(xs), int'(ys));
    end
  end

  always_ff @(posedge clk) data <= mem[addr];

endmodule
