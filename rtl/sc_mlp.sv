// sc_mlp: three-layer multilayer perceptron in stochastic computing with
// online learning (N_X inputs, N_V hidden neurons, N_Y outputs).
//
// Forward, per stream cycle (all combinational AND/OR logic):
//   hidden  h+_j = OR_k(w+_jk & X_k), h-_j = OR_k(w-_jk & X_k), V_j = g(h+_j & ~h-_j)
//   output  h+_i = OR_j(W+_ij & V_j), h-_i = OR_j(W-_ij & V_j), Y_i = g(h+_i & ~h-_i)
// with g the OR-gate pseudo-activation. Each output stream is decoded by a
// 9-bit up/down counter (used as a ones counter) over the L = 255 cycles of
// a pass, so y_val[i] = number of ones, about 255*p(Y_i).
// Learning (train=1): target streams give the error pair (ep, en) = t - y;
// the output layer updates its weights from it and sends back (bp_p, bp_n)
// as the delta of the hidden layer. Every weight integrates its update
// stream during the same pass and adds it in the FINISH cycle, so one pass
// performs forward, backward and update of one training sample.
// Random numbers: one 8-bit LFSR per input, per weight column and sign, per
// target, and one for the learning-rate stream (eta = ETA/256).
//
// Interface: drive x_val/t_val, pulse start (with train); done pulses one
// cycle L+1 cycles later, when y_val is valid (it holds until the next
// start). Inputs must stay stable during the pass. Weights are written and
// read with the wr_*/rd_* ports (layer 0 = input-to-hidden w_jk with
// row j, col k; layer 1 = hidden-to-output W_ij with row i, col j); writes are
// meant for idle time.
// Network size 197-64-10, L = 255, 8-bit weights and LFSRs, 9-bit counters
// and eta = 0.3 follow the description; the ports, the sequencing, the
// update rule details and the reset weights are this design's choices.
module sc_mlp import sc_pkg::*; #(
  parameter int unsigned N_X    = NX_DEFAULT,
  parameter int unsigned N_V    = NV_DEFAULT,
  parameter int unsigned N_Y    = NY_DEFAULT,
  parameter int unsigned L      = STREAM_L,
  parameter val_t        ETA    = val_t'(ETA_DEFAULT),
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              train,
  input  val_t              x_val [N_X],
  input  val_t              t_val [N_Y],
  output val_t              y_val [N_Y],
  output logic              busy,
  output logic              done,
  input  logic              wr_en,
  input  logic              wr_layer,
  input  logic              wr_neg,
  input  logic [ADDR_W-1:0] wr_row,
  input  logic [ADDR_W-1:0] wr_col,
  input  val_t              wr_data,
  input  logic              rd_layer,
  input  logic              rd_neg,
  input  logic [ADDR_W-1:0] rd_row,
  input  logic [ADDR_W-1:0] rd_col,
  output val_t              rd_data
);
  // LFSR index map: inputs, hidden columns (+,-), output columns (+,-),
  // targets, learning rate.
  localparam int unsigned IDX_H   = N_X;
  localparam int unsigned IDX_O   = 3 * N_X;
  localparam int unsigned IDX_T   = 3 * N_X + 2 * N_V;
  localparam int unsigned IDX_ETA = 3 * N_X + 2 * N_V + N_Y;

  logic clr, en, apply;

  sc_mlp_ctrl #(.L(L)) u_ctrl (
    .clk, .rst_n, .start, .train, .clr, .en, .apply, .busy, .done
  );

  // ---------------- input encoders ----------------
  logic [N_X-1:0] x_bit;
  for (genvar k = 0; k < N_X; k++) begin : g_in
    val_t r;
    lfsr8 #(.SEED(lfsr_seed(k))) u_lfsr (.clk, .rst_n, .en, .rnd(r));
    sng u_sng (.value(x_val[k]), .rnd(r), .bit_o(x_bit[k]));
  end

  // ---------------- learning-rate stream ----------------
  val_t r_eta;
  logic eta_bit;
  lfsr8 #(.SEED(lfsr_seed(IDX_ETA))) u_lfsr_eta (.clk, .rst_n, .en, .rnd(r_eta));
  sng u_sng_eta (.value(ETA), .rnd(r_eta), .bit_o(eta_bit));

  // ---------------- layers ----------------
  logic [N_V-1:0] hid_hp, hid_hn, v_bit, del_v_p, del_v_n;
  logic [N_Y-1:0] out_hp, out_hn, y_bit, err_p, err_n;
  logic [N_X-1:0] in_bp_p, in_bp_n;   // error at the inputs: not used
  val_t           rd_hid, rd_out;

  sc_layer #(.N_IN(N_X), .N_OUT(N_V), .LAYER(0), .SEED_BASE(IDX_H), .ADDR_W(ADDR_W)) u_hidden (
    .clk, .rst_n, .clr, .en, .apply, .eta_bit,
    .x(x_bit), .d_p(del_v_p), .d_n(del_v_n),
    .hp(hid_hp), .hn(hid_hn), .v(v_bit), .bp_p(in_bp_p), .bp_n(in_bp_n),
    .wr_en(wr_en && wr_layer == LAYER_HIDDEN), .wr_neg, .wr_row, .wr_col, .wr_data,
    .rd_neg, .rd_row, .rd_col, .rd_data(rd_hid)
  );

  sc_layer #(.N_IN(N_V), .N_OUT(N_Y), .LAYER(1), .SEED_BASE(IDX_O), .ADDR_W(ADDR_W)) u_output (
    .clk, .rst_n, .clr, .en, .apply, .eta_bit,
    .x(v_bit), .d_p(err_p), .d_n(err_n),
    .hp(out_hp), .hn(out_hn), .v(y_bit), .bp_p(del_v_p), .bp_n(del_v_n),
    .wr_en(wr_en && wr_layer == LAYER_OUTPUT), .wr_neg, .wr_row, .wr_col, .wr_data,
    .rd_neg, .rd_row, .rd_col, .rd_data(rd_out)
  );

  assign rd_data = (rd_layer == LAYER_OUTPUT) ? rd_out : rd_hid;

  // ---------------- targets, error, output decoders ----------------
  for (genvar i = 0; i < N_Y; i++) begin : g_out
    val_t r;
    logic t_bit;
    cnt_t ones;
    lfsr8 #(.SEED(lfsr_seed(IDX_T + i))) u_lfsr (.clk, .rst_n, .en, .rnd(r));
    sc_error u_err (.target(t_val[i]), .rnd(r), .y(y_bit[i]), .t_bit, .ep(err_p[i]), .en(err_n[i]));
    ud_counter u_dec (.clk, .rst_n, .clr, .en, .up(y_bit[i]), .dn(1'b0), .count(ones));
    assign y_val[i] = ones[VAL_W-1:0];
  end
endmodule
