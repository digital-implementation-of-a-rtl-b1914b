// tb_sc_mlp: end-to-end test of the stochastic MLP at a reduced size
// (5-6-3 network, full stream length L = 255).
//
// A cycle-accurate reference model (sc_ref_pkg) runs beside the design. The
// test writes weights, runs a mix of training and inference passes and, after
// each pass, compares every decoded output and every weight (read back through
// the read port) with the model. It checks that done arrives L+1 cycles after
// start, and counts the mechanisms of the design: training and inference
// passes, host writes, clipped weight updates, shunting (pseudo-subtraction)
// events, error streams of both signs, back-propagated error reaching the
// hidden layer, and hidden weights changed by learning. A mechanism that never
// occurs counts as a failure.
module tb_sc_mlp;
  import sc_pkg::*;
  import sc_ref_pkg::*;

  localparam int NX = 5, NV = 6, NY = 3;
  localparam int L  = 255;
  localparam int PASSES = 24;

  logic clk = 0, rst_n = 0;
  logic start = 0, train = 0;
  val_t x_val [NX];
  val_t t_val [NY];
  val_t y_val [NY];
  logic busy, done;
  logic wr_en = 0, wr_layer = 0, wr_neg = 0;
  logic [7:0] wr_row = 0, wr_col = 0;
  val_t wr_data = 0;
  logic rd_layer = 0, rd_neg = 0;
  logic [7:0] rd_row = 0, rd_col = 0;
  val_t rd_data;

  sc_mlp #(.N_X(NX), .N_V(NV), .N_Y(NY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_train = 0, n_infer = 0, n_write = 0, n_hid_changed = 0;
  mlp_ref m;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_w(bit layer, bit neg, int row, int col, bit [7:0] d);
    @(negedge clk);
    wr_en = 1; wr_layer = layer; wr_neg = neg; wr_row = 8'(row); wr_col = 8'(col); wr_data = d;
    @(negedge clk);
    wr_en = 0;
    n_write++;
    if (layer) begin
      if (neg) m.out.wn[row*NV+col] = d; else m.out.wp[row*NV+col] = d;
    end else begin
      if (neg) m.hid.wn[row*NX+col] = d; else m.hid.wp[row*NX+col] = d;
    end
  endtask

  function automatic bit [7:0] model_w(bit layer, bit neg, int row, int col);
    if (layer) return neg ? m.out.wn[row*NV+col] : m.out.wp[row*NV+col];
    else       return neg ? m.hid.wn[row*NX+col] : m.hid.wp[row*NX+col];
  endfunction

  task automatic check_weights();
    for (int layer = 0; layer < 2; layer++)
      for (int neg = 0; neg < 2; neg++)
        for (int r = 0; r < (layer ? NY : NV); r++)
          for (int c = 0; c < (layer ? NV : NX); c++) begin
            @(negedge clk);
            rd_layer = layer[0]; rd_neg = neg[0]; rd_row = 8'(r); rd_col = 8'(c);
            #1;
            checks++;
            if (rd_data !== model_w(layer[0], neg[0], r, c)) begin
              failures++;
              if (failures < 10)
                $display("weight mismatch L%0d %s [%0d][%0d]: dut=%0d model=%0d",
                         layer, neg ? "-" : "+", r, c, rd_data, model_w(layer[0], neg[0], r, c));
            end
          end
  endtask

  task automatic run_pass(bit do_train);
    bit [7:0] xv[] = new[NX];
    bit [7:0] tv[] = new[NY];
    int lat;
    bit [7:0] hid_before[];
    foreach (xv[k]) xv[k] = x_val[k];
    foreach (tv[i]) tv[i] = t_val[i];
    hid_before = new[NV*NX];
    foreach (hid_before[q]) hid_before[q] = m.hid.wp[q];
    @(negedge clk);
    start = 1; train = do_train;
    @(negedge clk);
    start = 0;
    m.clear();
    for (int c = 0; c < L; c++) m.cycle(xv, tv);
    if (do_train) m.apply();
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != L + 1) begin
      failures++;
      $display("latency %0d, expected %0d", lat, L + 1);
    end
    for (int i = 0; i < NY; i++) begin
      checks++;
      if (y_val[i] != 8'(m.ycnt[i])) begin
        failures++;
        $display("y[%0d] dut=%0d model=%0d", i, y_val[i], m.ycnt[i]);
      end
    end
    @(negedge clk);
    check_weights();
    if (do_train) begin
      n_train++;
      foreach (hid_before[q]) if (hid_before[q] != m.hid.wp[q]) n_hid_changed++;
    end else n_infer++;
  endtask

  task automatic mech(string what, int n);
    checks++;
    $display("  %-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    m = new(NX, NV, NY, 8'(ETA_DEFAULT));
    foreach (x_val[k]) x_val[k] = 0;
    foreach (t_val[i]) t_val[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check_weights();               // reset values
    // Host writes: a mid-size hidden layer and output weights, including
    // two at the ends of the range so that updates must clip.
    for (int j = 0; j < NV; j++)
      for (int k = 0; k < NX; k++) begin
        write_w(0, 0, j, k, 8'($urandom_range(10, 90)));
        write_w(0, 1, j, k, 8'($urandom_range(0, 40)));
      end
    for (int i = 0; i < NY; i++)
      for (int j = 0; j < NV; j++) begin
        write_w(1, 0, i, j, 8'($urandom_range(20, 120)));
        write_w(1, 1, i, j, 8'($urandom_range(0, 40)));
      end
    write_w(1, 0, 0, 0, 8'd254);
    write_w(1, 1, 1, 0, 8'd1);
    check_weights();
    for (int p = 0; p < PASSES; p++) begin
      foreach (x_val[k]) x_val[k] = 8'($urandom_range(0, 255));
      foreach (t_val[i]) t_val[i] = (i == 0) ? 8'd250 : (i == 1) ? 8'd5 : 8'($urandom_range(0, 255));
      run_pass(p % 4 != 3);
    end
    $display("mechanisms:");
    mech("training passes", n_train);
    mech("inference passes", n_infer);
    mech("host weight writes", n_write);
    mech("clipped weight updates", m.hid.clip_events + m.out.clip_events);
    mech("shunting (h+ and h- both 1)", m.n_shunt);
    mech("error stream t>y bits", m.n_err_p);
    mech("error stream y>t bits", m.n_err_n);
    mech("back-propagated error bits", m.n_bp);
    mech("hidden weights changed", n_hid_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
