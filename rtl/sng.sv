// sng: stochastic number generator (binary-to-stream encoder).
//
// A digital comparator emits 1 when the random number R is below the value E
// and 0 otherwise, so over a full LFSR period the stream holds E ones out of
// 255 (E = 255 gives 254 ones, since R never takes the value 0).
// Purely combinational; this is the encoder the description gives.
module sng import sc_pkg::*; (
  input  val_t value,   // E
  input  val_t rnd,     // R
  output logic bit_o
);
  always_comb bit_o = (rnd < value);
endmodule
