// sc_layer: one fully connected stochastic layer with online learning.
//
// Holds N_OUT x N_IN excitatory (+) and shunting (-) weights, each an 8-bit
// register encoded against a random number shared by its column (one LFSR
// per column and sign), and N_OUT neurons (sc_neuron). Weights in one column
// meet the same input stream, so only weights in different columns, which
// are summed together, need independent random numbers.
//
// Learning. With u = hp*(1-hn) and the delta of neuron j given as a
// differential stream pair (d_p, d_n), gradient descent on the squared error
// (treating the OR sum as a plain sum and folding the slope of g into the
// learning rate) gives
//   dW+[j][k] =  eta * delta_j * x_k * (1 - hn_j)
//   dW-[j][k] = -eta * delta_j * x_k * hp_j
// Every term is a product of streams, so each weight's up/down streams are
// AND gates, integrated over the pass by the weight's 9-bit counter and added
// to the register when apply pulses. The error sent back to the inputs is
//   bp_k = OR_j [ delta_j * (W+[j][k]*(1-hn_j) - W-[j][k]*hp_j) ]
// with the sign split into the pair (bp_p, bp_n). The description says only
// that learning is SGD obtained by differentiating the error through its
// forward circuit; these equations are this design's derivation.
//
// Host access: wr_en writes one weight (sign wr_neg, neuron wr_row, input
// wr_col); rd_data shows the weight selected by the rd_* address
// (combinational, 0 when out of range).
// Timing: streams are combinational in the cycle; see sc_weight for updates.
module sc_layer import sc_pkg::*; #(
  parameter int unsigned N_IN       = 4,
  parameter int unsigned N_OUT      = 3,
  parameter int unsigned LAYER      = 0,   // 0 hidden, 1 output (reset values)
  parameter int unsigned SEED_BASE  = 0,   // LFSR index of the first column
  parameter int unsigned ADDR_W     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              en,
  input  logic              apply,
  input  logic              eta_bit,
  input  logic [N_IN-1:0]   x,
  input  logic [N_OUT-1:0]  d_p,
  input  logic [N_OUT-1:0]  d_n,
  output logic [N_OUT-1:0]  hp,
  output logic [N_OUT-1:0]  hn,
  output logic [N_OUT-1:0]  v,
  output logic [N_IN-1:0]   bp_p,
  output logic [N_IN-1:0]   bp_n,
  input  logic              wr_en,
  input  logic              wr_neg,
  input  logic [ADDR_W-1:0] wr_row,
  input  logic [ADDR_W-1:0] wr_col,
  input  val_t              wr_data,
  input  logic              rd_neg,
  input  logic [ADDR_W-1:0] rd_row,
  input  logic [ADDR_W-1:0] rd_col,
  output val_t              rd_data
);
  initial assert (N_IN <= (1 << ADDR_W) && N_OUT <= (1 << ADDR_W))
    else $error("sc_layer: ADDR_W too small");

  val_t             rnd_p [N_IN];
  val_t             rnd_n [N_IN];
  val_t             wp_val [N_OUT][N_IN];
  val_t             wn_val [N_OUT][N_IN];
  logic [N_IN-1:0]  wp_bit [N_OUT];
  logic [N_IN-1:0]  wn_bit [N_OUT];
  logic [N_OUT-1:0] u;

  for (genvar k = 0; k < N_IN; k++) begin : g_col
    lfsr8 #(.SEED(lfsr_seed(SEED_BASE + k)))        u_rp (.clk, .rst_n, .en, .rnd(rnd_p[k]));
    lfsr8 #(.SEED(lfsr_seed(SEED_BASE + N_IN + k))) u_rn (.clk, .rst_n, .en, .rnd(rnd_n[k]));
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_row
    for (genvar k = 0; k < N_IN; k++) begin : g_syn
      logic sel, up_p, dn_p, up_n, dn_n;
      always_comb begin
        sel  = wr_en && (wr_row == ADDR_W'(j)) && (wr_col == ADDR_W'(k));
        up_p = eta_bit & d_p[j] & x[k] & ~hn[j];
        dn_p = eta_bit & d_n[j] & x[k] & ~hn[j];
        up_n = eta_bit & d_n[j] & x[k] &  hp[j];
        dn_n = eta_bit & d_p[j] & x[k] &  hp[j];
      end
      sc_weight #(.INIT(weight_init(LAYER, 0, j, k))) u_wp (
        .clk, .rst_n, .clr, .en, .rnd(rnd_p[k]), .up(up_p), .dn(dn_p), .apply,
        .wr_en(sel && !wr_neg), .wr_data, .w(wp_val[j][k]), .w_bit(wp_bit[j][k])
      );
      sc_weight #(.INIT(weight_init(LAYER, 1, j, k))) u_wn (
        .clk, .rst_n, .clr, .en, .rnd(rnd_n[k]), .up(up_n), .dn(dn_n), .apply,
        .wr_en(sel && wr_neg), .wr_data, .w(wn_val[j][k]), .w_bit(wn_bit[j][k])
      );
    end
    sc_neuron #(.N_IN(N_IN)) u_neuron (
      .clk, .rst_n, .clr, .en, .x, .wp(wp_bit[j]), .wn(wn_bit[j]),
      .hp(hp[j]), .hn(hn[j]), .u(u[j]), .v(v[j])
    );
  end

  // Back-propagated error towards the inputs (imperfect addition over j).
  always_comb begin
    bp_p = '0;
    bp_n = '0;
    for (int j = 0; j < N_OUT; j++) begin
      bp_p |= ({N_IN{d_p[j] & ~hn[j]}} & wp_bit[j]) | ({N_IN{d_n[j] & hp[j]}} & wn_bit[j]);
      bp_n |= ({N_IN{d_n[j] & ~hn[j]}} & wp_bit[j]) | ({N_IN{d_p[j] & hp[j]}} & wn_bit[j]);
    end
  end

  localparam int unsigned RW = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int unsigned CW = (N_IN  > 1) ? $clog2(N_IN)  : 1;

  always_comb begin
    rd_data = '0;
    if (32'(rd_row) < N_OUT && 32'(rd_col) < N_IN)
      rd_data = rd_neg ? wn_val[rd_row[RW-1:0]][rd_col[CW-1:0]]
                       : wp_val[rd_row[RW-1:0]][rd_col[CW-1:0]];
  end
endmodule
