// lfsr: 16-bit maximal-length Galois linear feedback shift register.
//
// Supplies the uniform random bits used for stochastic rounding of the
// weight update. Polynomial x^16 + x^14 + x^13 + x^11 + 1 (period 65535);
// the state never becomes zero. One step per cycle while `en` is high.
// The register width and polynomial are this design's choice; the
// document states only that the random numbers come from an LFSR.
module lfsr #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] rnd
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  rnd <= (SEED == 16'h0) ? 16'h1 : SEED;
    else if (en) rnd <= (rnd >> 1) ^ (rnd[0] ? 16'hB400 : 16'h0000);
endmodule
