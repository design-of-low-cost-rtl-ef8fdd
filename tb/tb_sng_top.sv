// tb_sng_top -- end-to-end testbench for sng_top at its default size (K = 8).
//
// A reference model in the testbench (its own LFSR step and WBG priority
// scan) predicts lfsr_q, out1 and out2 every cycle. The test runs several
// complete conversions of 255 cycles each, one full LFSR period:
//   1. after reset, X = 4 and Y = 77: out1 must carry exactly 4 ones and
//      out2 exactly 77 ones;
//   2. after a seed load in mid-run, new random X and Y: again exactly X and
//      Y ones over the next 255 cycles;
//   3. X = Y: the two streams from the shared LFSR must be identical;
//   4. X = 0 and X = 255: no ones and 255 ones.
// Because both WBGs share the random bits, the streams are 1 together in
// exactly X & Y cycles of each period; that is checked too.
// It counts each mechanism (seed load, LFSR period wrap, ones on out1 and
// out2, a cycle where both outputs are 1 from the shared random bits) and
// fails a mechanism that never occurred.
module tb_sng_top;

  localparam int unsigned K      = 8;
  localparam int unsigned PERIOD = 255;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         seed_load;
  logic [K-1:0] seed;
  logic [K-1:0] x;
  logic [K-1:0] y;
  logic         out1;
  logic         out2;
  logic [K-1:0] lfsr_q;

  int checks   = 0;
  int failures = 0;
  int n_seed_loads  = 0;
  int n_wraps       = 0;
  int n_out1_ones   = 0;
  int n_out2_ones   = 0;
  int n_both_ones   = 0;

  logic [K-1:0] model;
  logic [K-1:0] start_state;

  sng_top dut (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed),
    .x(x), .y(y), .out1(out1), .out2(out2), .lfsr_q(lfsr_q)
  );

  always #5 clk = ~clk;

  function automatic logic [K-1:0] model_next(input logic [K-1:0] s);
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7:1]};
  endfunction

  // Output of a WBG: the target bit at the highest 1 of the random word.
  function automatic logic model_wbg(input logic [K-1:0] l, input logic [K-1:0] t);
    logic r = 1'b0;
    for (int b = 0; b < K; b++) if (l[b]) r = t[b];
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t lfsr=%02h x=%02h y=%02h)", what, $time, lfsr_q, x, y);
    end
  endtask

  // Run one conversion of PERIOD cycles from the current state, checking
  // every cycle against the model and the one counts at the end.
  task automatic convert(input logic [K-1:0] tx, input logic [K-1:0] ty);
    int ones1 = 0;
    int ones2 = 0;
    int both  = 0;
    x = tx;
    y = ty;
    start_state = lfsr_q;
    for (int n = 0; n < PERIOD; n++) begin
      #1;
      check(lfsr_q == model, "LFSR state matches model");
      check(out1 == model_wbg(model, x), "out1 matches model");
      check(out2 == model_wbg(model, y), "out2 matches model");
      ones1 += int'(out1);
      ones2 += int'(out2);
      n_out1_ones += int'(out1);
      n_out2_ones += int'(out2);
      n_both_ones += int'(out1 & out2);
      both        += int'(out1 & out2);
      @(negedge clk);
      model = model_next(model);
    end
    if (lfsr_q == start_state) n_wraps++;
    check(lfsr_q == start_state, "LFSR returns to its start state after 255 cycles");
    check(ones1 == int'(tx), $sformatf("out1 carries X=%0d ones (got %0d)", tx, ones1));
    check(ones2 == int'(ty), $sformatf("out2 carries Y=%0d ones (got %0d)", ty, ones2));
    check(both == int'(tx & ty), $sformatf("streams overlap in X&Y=%0d cycles (got %0d)", tx & ty, both));
  endtask

  initial begin
    logic [K-1:0] rx;
    logic [K-1:0] ry;
    logic [K-1:0] rs;

    rst_n     = 1'b0;
    seed_load = 1'b0;
    seed      = '0;
    x         = '0;
    y         = '0;
    #12;
    @(negedge clk);
    rst_n = 1'b1;
    model = 8'h01;
    check(lfsr_q == model, "reset seed");

    // 1. The document's example: target 00000100 gives 4 ones.
    convert(8'd4, 8'd77);

    // 2. Seed loads in mid-run followed by random targets.
    for (int r = 0; r < 6; r++) begin
      repeat (1 + ($urandom % 50)) begin
        @(negedge clk);
        model = model_next(model);
      end
      do rs = K'($urandom); while (rs == '0);
      seed      = rs;
      seed_load = 1'b1;
      @(negedge clk);
      seed_load = 1'b0;
      model     = rs;
      n_seed_loads++;
      check(lfsr_q == rs, "seed load");
      rx = K'($urandom);
      ry = K'($urandom);
      convert(rx, ry);
    end

    // 3. Equal targets give identical streams from the shared source.
    begin
      int differ = 0;
      x = 8'd150;
      y = 8'd150;
      for (int n = 0; n < 64; n++) begin
        #1;
        if (out1 != out2) differ++;
        @(negedge clk);
        model = model_next(model);
      end
      check(differ == 0, "equal targets give identical streams");
    end

    // 4. End points of the range.
    convert(8'd0, 8'd255);

    check(n_seed_loads > 0, "mechanism: seed load occurred");
    check(n_wraps > 0, "mechanism: LFSR period wrap occurred");
    check(n_out1_ones > 0, "mechanism: out1 produced ones");
    check(n_out2_ones > 0, "mechanism: out2 produced ones");
    check(n_both_ones > 0, "mechanism: both outputs 1 in the same cycle");
    $display("mechanisms: seed_loads=%0d wraps=%0d out1_ones=%0d out2_ones=%0d both_ones=%0d",
             n_seed_loads, n_wraps, n_out1_ones, n_out2_ones, n_both_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
