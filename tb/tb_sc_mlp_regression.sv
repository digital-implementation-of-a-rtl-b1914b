// tb_sc_mlp_regression: a regression workload at the 9-32-8 network size
// (hidden and output widths as used for linear regression). A scalar x in
// [0, 1) is broadcast to all nine inputs; outputs 0-3 learn y = x and outputs
// 4-7 learn y = x/2. With NONLINEAR = 1 and NV = 128 the same bench runs the
// non-linear case at 9-128-8: outputs 0-3 learn cos and 4-7 learn sin of
// x*pi/2 (slow to compile, so not the default). The test measures the mean absolute output error on a
// fixed set of test points err_before training and err_after online training with
// random samples, one sample per pass, and requires the error to fall.
module tb_sc_mlp_regression;
  import sc_pkg::*;

  localparam bit NONLINEAR = 0;
  localparam int NX = 9, NV = 32, NY = 8;
  localparam int TRAIN_PASSES = 400;
  localparam int NTEST = 8;

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

  initial begin
    repeat (2000000) @(posedge clk);
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
  endtask

  function automatic int teach(int i, int x);
    real a;
    a = x / 256.0 * 3.14159265 / 2.0;
    if (NONLINEAR) return (i < 4) ? int'($floor(255.0 * $cos(a) + 0.5))
                                  : int'($floor(255.0 * $sin(a) + 0.5));
    return (i < 4) ? x : x / 2;
  endfunction

  task automatic pass(int x, bit do_train);
    foreach (x_val[k]) x_val[k] = 8'(x);
    foreach (t_val[i]) t_val[i] = 8'(teach(i, x));
    @(negedge clk); start = 1; train = do_train;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic test_error(output real mae);
    int sum = 0;
    for (int s = 0; s < NTEST; s++) begin
      int x = 16 + s * 30;
      pass(x, 0);
      foreach (y_val[i]) sum += (int'(y_val[i]) > teach(i, x)) ? int'(y_val[i]) - teach(i, x)
                                                               : teach(i, x) - int'(y_val[i]);
    end
    mae = sum / real'(NTEST * NY * 255);
  endtask

  initial begin
    real err_before, err_after;
    foreach (x_val[k]) x_val[k] = 0;
    foreach (t_val[i]) t_val[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < NV; j++)
      for (int k = 0; k < NX; k++) begin
        write_w(0, 0, j, k, 8'($urandom_range(5, 40)));
        write_w(0, 1, j, k, 8'($urandom_range(0, 20)));
      end
    for (int i = 0; i < NY; i++)
      for (int j = 0; j < NV; j++) begin
        write_w(1, 0, i, j, 8'($urandom_range(0, 30)));
        write_w(1, 1, i, j, 8'($urandom_range(0, 30)));
      end
    test_error(err_before);
    for (int p = 0; p < TRAIN_PASSES; p++) begin
      pass($urandom_range(0, 255), 1);
      if (p % 100 == 99) begin
        real e;
        test_error(e);
        $display("after %0d passes: mean abs error %0.3f", p + 1, e);
      end
    end
    test_error(err_after);
    $display("mean abs error before %0.3f after %0.3f", err_before, err_after);
    checks++;
    if (!(err_after < err_before * 0.8)) begin
      failures++;
      $display("training did not reduce the error enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
