// tb_sng_wbg_weights -- exhaustive testbench for sng_wbg_weights (K = 8).
//
// For all 256 inputs L the expected W is the single bit at the position of
// the highest 1 of L (zero for L = 0), found by a scan in the testbench.
// It also checks the weight counts over the 255 non-zero inputs: W_i is 1 in
// exactly 2^(i-1) of them (probability 2^-(9-i) for i = 8..1).
module tb_sng_wbg_weights;

  localparam int unsigned K = 8;

  logic [K-1:0] l;
  logic [K-1:0] w;
  int           checks   = 0;
  int           failures = 0;

  sng_wbg_weights dut (.l(l), .w(w));

  initial begin
    logic [K-1:0] expected;
    int           count [K];
    foreach (count[i]) count[i] = 0;
    for (int v = 0; v < 256; v++) begin
      l = K'(v);
      #1;
      expected = '0;
      for (int b = 0; b < K; b++) if (l[b]) expected = K'(1) << b;
      checks++;
      if (w !== expected) begin
        failures++;
        $display("FAIL l=%02h w=%02h expected %02h", l, w, expected);
      end
      for (int b = 0; b < K; b++) count[b] += int'(w[b]);
    end
    for (int b = 0; b < K; b++) begin
      checks++;
      if (count[b] != (1 << b)) begin
        failures++;
        $display("FAIL W%0d is 1 in %0d states, expected %0d", b + 1, count[b], 1 << b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
