// coeff_full: coefficient distribution for the four encoders.
//
// On each audio ready pulse the four source coordinates are captured. A
// 3-bit counter then walks the sources: for count i (0..3) all eleven
// harmonic ROMs are addressed with source i's {x, y} in parallel, and one
// clock later (ROM latency) their words are stored in source i's 16-entry
// coefficient register bank; the five harmonics without a ROM are held at
// zero. When the counter's MSB goes high the count stops and coeffs_valid is
// raised, staying high until the next ready pulse.
//
// Timing: ready in cycle 0; counter 0..3 in cycles 1..4 (address phase);
// banks written at the ends of cycles 2..5; coeffs_valid high from cycle 6,
// together with the last bank (ambi_pkg::COEFF_LATENCY = 6 cycles after
// ready). Coefficient outputs are stable while coeffs_valid is high.
//
// The counter scheme, the eleven ROMs and the zero harmonics follow the
// system description; the exact cycle alignment is this design's.
module coeff_full
  import ambi_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ready,
  input  coord_t [NUM_SRC-1:0] coord,
  output cvec_t  [NUM_SRC-1:0] coefs,
  output logic                 coeffs_valid
);

  logic [ROM_ADDR_W-1:0] addr_q [NUM_SRC];
  logic [2:0]            c_counter;
  logic                  done;
  logic                  wr_en;
  logic [1:0]            wr_sel;
  logic [ROM_ADDR_W-1:0] addr;
  coef_t                 rom_data [NUM_ROMS];

  assign done = c_counter[2];
  assign addr = addr_q[c_counter[1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      c_counter    <= 3'd4;
      coeffs_valid <= 1'b0;
      wr_en        <= 1'b0;
      wr_sel       <= '0;
      for (int i = 0; i < NUM_SRC; i++) addr_q[i] <= '0;
    end else begin
      if (ready) begin
        for (int i = 0; i < NUM_SRC; i++) addr_q[i] <= {coord[i].x, coord[i].y};
        c_counter <= '0;
      end else if (!done) begin
        c_counter <= c_counter + 3'd1;
      end
      // ROM data for the source addressed now arrives next cycle.
      wr_en        <= !done && !ready;
      wr_sel       <= c_counter[1:0];
      coeffs_valid <= ready ? 1'b0 : (coeffs_valid || (done && wr_en));
    end
  end

  for (genvar r = 0; r < NUM_ROMS; r++) begin : g_rom
    coeff_rom #(.HARM(ROM_HARM[r])) u_rom (
      .clk (clk),
      .addr(addr),
      .data(rom_data[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      coefs <= '0;
    end else if (wr_en) begin
      for (int r = 0; r < NUM_ROMS; r++) coefs[wr_sel][ROM_HARM[r]] <= rom_data[r];
    end
  end

endmodule
