// tb_sc_neuron: random input and weight bit vectors; checks the OR sums,
// the pseudo-subtraction u = h+ & ~h- and the activated output against a
// bit-level model, and the rate of u against p+ * (1 - p-).
module tb_sc_neuron;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, clr = 0, en = 1;
  logic [N-1:0] x, wp, wn;
  logic hp, hn, u, v;
  int checks = 0, failures = 0;

  sc_neuron #(.N_IN(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [2:0] h = 0;
    bit mhp, mhn, mu, mv;
    int n_u = 0, n_hp = 0, n_hp_nhn = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      x  = N'($urandom);
      wp = N'($urandom) & N'($urandom) & N'($urandom);
      wn = N'($urandom) & N'($urandom) & N'($urandom) & N'($urandom);
      #1;
      mhp = 0; mhn = 0;
      for (int k = 0; k < N; k++) begin
        if (x[k] & wp[k]) mhp = 1;
        if (x[k] & wn[k]) mhn = 1;
      end
      mu = mhp & !mhn;
      mv = (mu | h[0]) & (h[1] | h[2]);
      checks++;
      if ({hp, hn, u, v} !== {mhp, mhn, mu, mv}) begin
        failures++;
        if (failures < 5) $display("got %b%b%b%b exp %b%b%b%b", hp, hn, u, v, mhp, mhn, mu, mv);
      end
      n_u += int'(u); n_hp += int'(hp); n_hp_nhn += int'(!hn);
      @(negedge clk);
      h = {h[1:0], mu};
    end
    // x and the weights are independent, so p(u) ~ p(h+) * (1 - p(h-))
    checks++;
    if (n_u / 20000.0 > (n_hp / 20000.0) * (n_hp_nhn / 20000.0) + 0.1 ||
        n_u / 20000.0 < (n_hp / 20000.0) * (n_hp_nhn / 20000.0) - 0.1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
