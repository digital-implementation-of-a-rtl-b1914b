// tb_sc_error: exhaustive bit check of the target encoder and the error pair
// ep = T & ~Y, en = Y & ~T; then, with an independent random output stream
// Y of rate y, the decoded difference of (ep, en) must be close to t - y.
module tb_sc_error;
  logic [7:0] target, rnd;
  logic y, t_bit, ep, en;
  int checks = 0, failures = 0;

  sc_error dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t += 3)
      for (int r = 0; r < 256; r++)
        for (int yy = 0; yy < 2; yy++) begin
          bit tb_t;
          tb_t = 0;
          target = 8'(t); rnd = 8'(r); y = yy[0];
          #1;
          tb_t = (r < t);
          checks++;
          if ({t_bit, ep, en} !== {tb_t, tb_t & !yy[0], yy[0] & !tb_t}) failures++;
        end
    for (int q = 0; q < 12; q++) begin
      int tv, yv, diff;
      real d;
      tv = $urandom_range(0, 255);
      yv = $urandom_range(0, 255);
      diff = 0;
      target = 8'(tv);
      for (int i = 0; i < 20000; i++) begin
        rnd = 8'($urandom_range(0, 255));
        y = ($urandom_range(0, 255) < yv);
        #1;
        diff += int'(ep) - int'(en);
      end
      d = diff / 20000.0;
      checks++;
      if (d > (tv - yv) / 256.0 + 0.03 || d < (tv - yv) / 256.0 - 0.03) begin
        failures++;
        $display("t=%0d y=%0d decoded %0.3f", tv, yv, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
