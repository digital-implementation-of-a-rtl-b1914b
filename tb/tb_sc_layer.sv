// tb_sc_layer: one 4-input, 3-neuron layer against the reference layer model.
// Each cycle random input, delta and learning-rate bits are driven; the
// neuron streams (h+, h-, v) and the back-propagated error pair are compared
// every cycle; after each pass of 255 cycles the weights are updated with
// apply and all of them are read back and compared, including after host
// writes that push some weights to the ends of the range.
module tb_sc_layer;
  import sc_pkg::*;
  import sc_ref_pkg::*;
  localparam int NI = 4, NO = 3, BASE = 7;

  logic clk = 0, rst_n = 0, clr = 0, en = 0, apply = 0, eta_bit = 0;
  logic [NI-1:0] x = 0, bp_p, bp_n;
  logic [NO-1:0] d_p = 0, d_n = 0, hp, hn, v;
  logic wr_en = 0, wr_neg = 0, rd_neg = 0;
  logic [7:0] wr_row = 0, wr_col = 0, rd_row = 0, rd_col = 0;
  val_t wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  layer_ref m;

  sc_layer #(.N_IN(NI), .N_OUT(NO), .LAYER(1), .SEED_BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_weights();
    for (int neg = 0; neg < 2; neg++)
      for (int r = 0; r < NO; r++)
        for (int c = 0; c < NI; c++) begin
          bit [7:0] e = neg ? m.wn[r*NI+c] : m.wp[r*NI+c];
          rd_neg = neg[0]; rd_row = 8'(r); rd_col = 8'(c);
          #1;
          checks++;
          if (rd_data !== e) begin
            failures++;
            if (failures < 10) $display("w%s[%0d][%0d] dut=%0d model=%0d", neg ? "-" : "+", r, c, rd_data, e);
          end
        end
    rd_row = 8'(NO); #1;
    checks++; if (rd_data !== 0) failures++;
  endtask

  initial begin
    bit xb[] = new[NI];
    bit dp[] = new[NO];
    bit dn[] = new[NO];
    int mism = 0;
    m = new(NI, NO, 1, BASE);
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_weights();
    for (int pass = 0; pass < 12; pass++) begin
      if (pass == 3) begin
        for (int r = 0; r < NO; r++)
          for (int c = 0; c < NI; c++) begin
            @(negedge clk);
            wr_en = 1; wr_neg = 0; wr_row = 8'(r); wr_col = 8'(c); wr_data = 8'($urandom_range(0, 255));
            m.wp[r*NI+c] = wr_data;
            @(negedge clk);
            wr_neg = 1; wr_data = (c == 0) ? 8'd0 : 8'($urandom_range(0, 255));
            m.wn[r*NI+c] = wr_data;
          end
        @(negedge clk); wr_en = 0;
        check_weights();
      end
      @(negedge clk); clr = 1; m.clear();
      @(negedge clk); clr = 0; en = 1;
      for (int c = 0; c < 255; c++) begin
        x = NI'($urandom); d_p = NO'($urandom); d_n = NO'($urandom) & ~d_p;
        if (pass % 2 == 1) d_n = d_n & NO'($urandom);   // bias the delta sign
        else               d_p = d_p & NO'($urandom);
        eta_bit = 1'($urandom_range(0, 1));
        foreach (xb[k]) xb[k] = x[k];
        foreach (dp[j]) begin dp[j] = d_p[j]; dn[j] = d_n[j]; end
        m.eval_fwd(xb);
        m.eval_bp(dp, dn);
        #1;
        for (int j = 0; j < NO; j++) begin
          checks++;
          if ({hp[j], hn[j], v[j]} !== {m.hp[j], m.hn[j], m.v[j]}) begin
            failures++; mism++;
            if (mism < 5) $display("neuron %0d cycle %0d", j, c);
          end
        end
        for (int k = 0; k < NI; k++) begin
          checks++;
          if ({bp_p[k], bp_n[k]} !== {m.bpp[k], m.bpn[k]}) begin
            failures++; mism++;
            if (mism < 5) $display("bp %0d cycle %0d", k, c);
          end
        end
        m.step(xb, dp, dn, eta_bit);
        @(negedge clk);
      end
      en = 0; apply = 1; m.apply();
      @(negedge clk); apply = 0;
      check_weights();
    end
    $display("clip events in model: %0d", m.clip_events);
    checks++; if (m.clip_events == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
