// sc_activation: pseudo-activation g(X) = (2X - X^2)^2 built from OR gates.
//
// An OR of two independent streams of equal probability p gives 2p - p^2.
// The stream is ORed with a copy of itself delayed by one D-FF, giving
// a_t = X_t | X_{t-1}; a second gate ANDs a_t with a_{t-2} = X_{t-2} | X_{t-3},
// which shares no bit with a_t, squaring its probability. The threshold of
// the resulting sigmoid-like curve lies near 0.5.
// The OR stage and the D-FF delays follow the description; how the square is
// formed (an AND with a copy delayed by two cycles) is this design's reading.
// Timing: combinational from x to y using three history flip-flops that
// shift on en and are zeroed by clr (start of a pass) or reset.
module sc_activation (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic x,
  output logic y
);
  logic [2:0] hist;   // hist[0] = X_{t-1}, hist[1] = X_{t-2}, hist[2] = X_{t-3}

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    hist <= '0;
    else if (clr)  hist <= '0;
    else if (en)   hist <= {hist[1:0], x};
  end

  logic or_now, or_old;
  always_comb begin
    or_now = x | hist[0];
    or_old = hist[1] | hist[2];
    y      = or_now & or_old;
  end
endmodule
