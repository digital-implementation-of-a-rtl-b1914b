// tb_ud_counter: random up/down/hold/clear traffic against an integer model
// with saturation at -256 and +255, then long one-way runs that must stop at
// both ends of the 9-bit range.
module tb_ud_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, up = 0, dn = 0;
  logic signed [8:0] count;
  int checks = 0, failures = 0;
  int model = 0;

  ud_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(negedge clk);
    if (clr) model = 0;
    else if (en) begin
      if (up && !dn && model < 255) model++;
      else if (dn && !up && model > -256) model--;
    end
    checks++;
    if (int'(count) != model) begin
      failures++;
      if (failures < 5) $display("count=%0d model=%0d", count, model);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++; if (count !== 0) failures++;
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 7) != 0);
      up = 1'($urandom_range(0, 1));
      dn = 1'($urandom_range(0, 1));
      clr = ($urandom_range(0, 499) == 0);
      tick();
    end
    clr = 0; en = 1; up = 1; dn = 0;
    repeat (600) tick();
    checks++; if (count != 255) begin failures++; $display("top %0d", count); end
    up = 0; dn = 1;
    repeat (600) tick();
    checks++; if (count != -256) begin failures++; $display("bottom %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
