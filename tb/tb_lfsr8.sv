// tb_lfsr8: checks the 8-bit LFSR against an independently written step
// (parity of the state under tap mask 8'hB8), that it holds when en is low,
// that it restarts from SEED on reset, and that it visits all 255 non-zero
// states once per period.
module tb_lfsr8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] rnd;
  int checks = 0, failures = 0;

  lfsr8 #(.SEED(8'h5A)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [7:0] exp_s;
    bit seen [256];
    int distinct = 0;
    repeat (2) @(negedge clk);
    checks++; if (rnd !== 8'h5A) failures++;
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++; if (rnd !== 8'h5A) begin failures++; $display("moved without en"); end
    en = 1;
    exp_s = 8'h5A;
    for (int i = 0; i < 255; i++) begin
      if (!seen[rnd]) distinct++;
      seen[rnd] = 1;
      checks++;
      if (rnd !== exp_s) begin failures++; $display("step %0d dut=%h exp=%h", i, rnd, exp_s); end
      exp_s = {exp_s[6:0], ^(exp_s & 8'hB8)};
      @(negedge clk);
    end
    checks++; if (distinct != 255) begin failures++; $display("distinct=%0d", distinct); end
    checks++; if (rnd !== 8'h5A) begin failures++; $display("period is not 255"); end
    checks++; if (seen[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
