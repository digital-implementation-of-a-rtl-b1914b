// tb_sng: exhaustive check of the comparator encoder (bit = R < E) over all
// 65536 value/random pairs, and of the stream count over one period of an
// 8-bit maximal LFSR sequence (E ones for E <= 255 minus the missing R = 0).
module tb_sng;
  logic [7:0] value, rnd;
  logic bit_o;
  int checks = 0, failures = 0;

  sng dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 256; e++)
      for (int r = 0; r < 256; r++) begin
        value = 8'(e); rnd = 8'(r);
        #1;
        checks++;
        if (bit_o !== (r < e)) begin
          failures++;
          if (failures < 5) $display("E=%0d R=%0d bit=%b", e, r, bit_o);
        end
      end
    // stream over one LFSR period: R takes each of 1..255 once
    for (int e = 0; e < 256; e += 17) begin
      bit [7:0] s;
      int ones;
      s = 8'h01;
      ones = 0;
      value = 8'(e);
      for (int i = 0; i < 255; i++) begin
        rnd = s; #1; ones += int'(bit_o);
        s = {s[6:0], ^(s & 8'hB8)};
      end
      checks++;
      if (ones != ((e == 0) ? 0 : e - 1)) begin failures++; $display("E=%0d ones=%0d", e, ones); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
