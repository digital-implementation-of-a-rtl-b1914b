// lfsr8: 8-bit maximal-length LFSR, the random number source of the encoders.
//
// Fibonacci form with feedback polynomial x^8+x^6+x^5+x^4+1; it walks through
// all 255 non-zero states, so one period equals one stream of L = 255 bits.
// The description only says an 8-bit LFSR is used; the polynomial, the seed
// parameter and the enable are choices of this implementation.
// Timing: rnd is the registered state; it advances on every clock with en=1.
// Reset loads SEED (which must be non-zero).
module lfsr8 import sc_pkg::*; #(
  parameter val_t SEED = 8'h01
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output val_t rnd
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rnd <= SEED;
    else if (en) rnd <= lfsr_next(rnd);
  end

  initial assert (SEED != '0) else $error("lfsr8: SEED must be non-zero");
endmodule
