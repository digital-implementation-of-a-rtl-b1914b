// tb_sc_weight: passes of random up/down update streams followed by apply;
// the register must become clip(w + ups - downs, 0, 255). Also checks the
// encoder output (w_bit = rnd < w), host writes, the reset value and that a
// pass without apply leaves the weight alone.
module tb_sc_weight;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, up = 0, dn = 0, apply = 0, wr_en = 0;
  logic [7:0] rnd = 0, wr_data = 0, w;
  logic w_bit;
  int checks = 0, failures = 0;
  int model;
  int clipped = 0;

  sc_weight #(.INIT(8'd17)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (w !== 8'd17) failures++;
    rst_n = 1;
    model = 17;
    for (int pass = 0; pass < 60; pass++) begin
      int acc, bias;
      acc = 0;
      bias = $urandom_range(0, 2);   // 0: mostly down, 1: even, 2: mostly up
      if (pass % 10 == 4) begin
        @(negedge clk); wr_en = 1; wr_data = 8'($urandom_range(0, 255));
        @(negedge clk); wr_en = 0; model = wr_data;
      end
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0; en = 1;
      for (int c = 0; c < 255; c++) begin
        up = ($urandom_range(0, 3) < bias + 1);
        dn = ($urandom_range(0, 3) >= bias + 1);
        if ($urandom_range(0, 5) == 0) up = dn;
        rnd = 8'($urandom_range(0, 255));
        #1;
        checks++;
        if (w_bit !== (rnd < w)) failures++;
        acc += int'(up && !dn) - int'(dn && !up);
        @(negedge clk);
      end
      en = 0; up = 0; dn = 0;
      apply = (pass % 7 != 6);
      @(negedge clk);
      apply = 0;
      if (pass % 7 != 6) begin
        if (model + acc > 255 || model + acc < 0) clipped++;
        model = (model + acc > 255) ? 255 : (model + acc < 0) ? 0 : model + acc;
      end
      checks++;
      if (int'(w) != model) begin
        failures++;
        $display("pass %0d w=%0d model=%0d", pass, w, model);
      end
    end
    checks++; if (clipped == 0) begin failures++; $display("no clipping exercised"); end
    $display("clipped passes: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
