// tb_sc_mlp_ctrl: runs training and inference passes with a short stream
// length and checks the sequence: clr only in the start cycle, en high for
// exactly L cycles, done one cycle after the last en, apply only on training
// passes, busy across the pass and start ignored while busy.
module tb_sc_mlp_ctrl;
  localparam int L = 20;
  logic clk = 0, rst_n = 0, start = 0, train = 0;
  logic clr, en, apply, busy, done;
  int checks = 0, failures = 0;

  sc_mlp_ctrl #(.L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(bit tr);
    int n_en = 0, lat = 0, n_apply = 0, n_clr = 0;
    @(negedge clk);
    start = 1; train = tr;
    #1;
    checks++; if (!clr) failures++;
    @(negedge clk);
    start = 1;            // ignored while busy
    train = !tr;
    do begin
      lat++;
      n_en += int'(en); n_apply += int'(apply); n_clr += int'(clr);
      checks++; if (!busy) failures++;
      if (!done) @(negedge clk);
    end while (!done);
    lat++;                       // the FINISH cycle
    n_apply += int'(apply);
    start = 0;
    checks++; if (n_en != L)  begin failures++; $display("en cycles %0d", n_en); end
    checks++; if (lat != L + 1) begin failures++; $display("latency %0d", lat); end
    checks++; if (n_clr != 0) failures++;
    checks++; if (n_apply != int'(tr)) begin failures++; $display("apply %0d train %0d", n_apply, tr); end
    @(negedge clk);
    checks++; if (busy || done) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (busy || en || done || apply) failures++;
    pass(1); pass(0); pass(1); pass(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
