// sc_error: target encoder and differential output error.
//
// The target t (8-bit) is encoded with its own random number into a stream T.
// With T independent of the network output stream Y, the two pseudo-
// subtractions ep = T AND NOT Y and en = Y AND NOT T have
//   p(ep) - p(en) = t(1-y) - y(1-t) = t - y,
// so the pair (ep, en) is the error t - y in differential representation,
// without decoding. The description states that learning is gradient descent
// on the error function; this error circuit is this design's construction
// from the description's pseudo-subtraction.
// Timing: combinational.
module sc_error import sc_pkg::*; (
  input  val_t target,
  input  val_t rnd,
  input  logic y,
  output logic t_bit,
  output logic ep,
  output logic en
);
  sng u_sng (.value(target), .rnd, .bit_o(t_bit));

  always_comb begin
    ep = t_bit & ~y;
    en = y & ~t_bit;
  end
endmodule
