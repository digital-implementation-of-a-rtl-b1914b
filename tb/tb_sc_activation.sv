// tb_sc_activation: checks the OR-gate pseudo-activation bit by bit against
// y_t = (x_t | x_{t-1}) & (x_{t-2} | x_{t-3}), checks clr and en, and checks
// the transfer curve: for Bernoulli inputs of probability p the output rate
// must be close to g(p) = (2p - p^2)^2 (within 0.02 over 40000 bits).
module tb_sc_activation;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, x = 0;
  logic y;
  int checks = 0, failures = 0;

  sc_activation dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit [3:0] h;   // model history, h[0] = previous bit

  initial begin
    real p, g, rate;
    repeat (2) @(negedge clk);
    rst_n = 1;
    en = 1;
    h = 0;
    for (int i = 0; i < 2000; i++) begin
      x = 1'($urandom_range(0, 1));
      if (i % 97 == 50) begin clr = 1; end
      if (i % 13 == 7)  begin en = 0; end
      #1;
      checks++;
      if (y !== ((x | h[0]) & (h[1] | h[2]))) begin
        failures++;
        if (failures < 5) $display("cycle %0d x=%b h=%b y=%b", i, x, h, y);
      end
      @(negedge clk);
      if (clr) h = 0; else if (en) h = {h[2:0], x};
      clr = 0; en = 1;
    end
    for (int q = 1; q < 10; q++) begin
      int ones;
      ones = 0;
      p = q / 10.0;
      for (int i = 0; i < 40000; i++) begin
        x = ($urandom_range(0, 9999) < q * 1000);
        #1; ones += int'(y);
        @(negedge clk);
      end
      rate = ones / 40000.0;
      g = (2 * p - p * p) * (2 * p - p * p);
      checks++;
      $display("p=%0.1f rate=%0.3f g=%0.3f", p, rate, g);
      if (rate > g + 0.02 || rate < g - 0.02) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
