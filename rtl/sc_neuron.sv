// sc_neuron: forward path of one stochastic neuron.
//
// Each input stream x[k] is multiplied (AND) with the excitatory weight
// stream wp[k] and with the shunting weight stream wn[k]. The products are
// summed by imperfect addition (a wide OR), giving hp and hn. Instead of a
// true subtraction the neuron forms u = hp AND NOT hn, i.e. hp*(1-hn)
// (pseudo-subtraction), and passes u through the OR-gate pseudo-activation:
//   v = g(hp * (1 - hn)),  g(X) = (2X - X^2)^2.
// All of this follows the description's forward equations.
// Timing: hp, hn and u are combinational; v is combinational from u and the
// activation's three history flip-flops (see sc_activation).
module sc_neuron #(
  parameter int unsigned N_IN = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            en,
  input  logic [N_IN-1:0] x,
  input  logic [N_IN-1:0] wp,
  input  logic [N_IN-1:0] wn,
  output logic            hp,
  output logic            hn,
  output logic            u,
  output logic            v
);
  always_comb begin
    hp = |(x & wp);
    hn = |(x & wn);
    u  = hp & ~hn;
  end

  sc_activation u_act (.clk, .rst_n, .clr, .en, .x(u), .y(v));
endmodule
