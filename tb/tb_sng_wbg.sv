// tb_sng_wbg -- exhaustive testbench for sng_wbg (K = 8).
//
// For every pair (L, X), 65536 in all, the expected output is target bit
// x_i where L_i is the highest 1 of L (0 for L = 0), computed by a scan in
// the testbench. For every X it also counts the ones over the 255 non-zero
// values of L: the count must equal X, i.e. P(out) = X / 2^8 up to the one
// missing all-zero state.
module tb_sng_wbg;

  localparam int unsigned K = 8;

  logic [K-1:0] l;
  logic [K-1:0] x;
  logic         seq;
  int           checks   = 0;
  int           failures = 0;

  sng_wbg dut (.l(l), .x(x), .seq(seq));

  initial begin
    logic expected;
    int   ones;
    for (int xv = 0; xv < 256; xv++) begin
      x    = K'(xv);
      ones = 0;
      for (int lv = 0; lv < 256; lv++) begin
        l = K'(lv);
        #1;
        expected = 1'b0;
        for (int b = 0; b < K; b++) if (l[b]) expected = x[b];
        checks++;
        if (seq !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL l=%02h x=%02h seq=%0b expected %0b", l, x, seq, expected);
        end
        ones += int'(seq);
      end
      checks++;
      if (ones != xv) begin
        failures++;
        $display("FAIL x=%0d gives %0d ones in 255 states", xv, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
