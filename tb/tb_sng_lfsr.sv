// tb_sng_lfsr -- self-checking testbench for sng_lfsr at its default size.
//
// A reference model in the testbench shifts L8 -> L1 and feeds
// L5 ^ L4 ^ L3 ^ L1 into L8, written bit by bit. The testbench checks:
// the reset seed, every state against the model, a period of exactly
// 255 cycles with 255 distinct non-zero states, 128 ones per bit per period,
// and a synchronous seed load in the middle of a run.
module tb_sng_lfsr;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         seed_load;
  logic [W-1:0] seed;
  logic [W-1:0] q;
  int           checks   = 0;
  int           failures = 0;

  sng_lfsr dut (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed), .q(q)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] model_next(input logic [W-1:0] s);
    // s[7] = L8 ... s[0] = L1
    return {s[4] ^ s[3] ^ s[2] ^ s[0], s[7], s[6], s[5], s[4], s[3], s[2], s[1]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (q=%02h)", what, q);
    end
  endtask

  initial begin
    logic [W-1:0] model;
    bit           seen [256];
    int           ones [W];
    int           period;

    rst_n     = 1'b0;
    seed_load = 1'b0;
    seed      = '0;
    #12;
    check(q == 8'h01, "reset loads default seed 0x01");
    @(negedge clk);
    rst_n = 1'b1;
    model = q;

    // One full period plus one step, compared with the model every cycle.
    foreach (seen[i]) seen[i] = 1'b0;
    foreach (ones[i]) ones[i] = 0;
    period = 0;
    for (int n = 0; n < 255; n++) begin
      check(!seen[q], "state repeats before 255 cycles");
      seen[q] = 1'b1;
      for (int b = 0; b < W; b++) ones[b] += int'(q[b]);
      @(negedge clk);
      model = model_next(model);
      check(q == model, "state matches reference model");
      check(q != '0, "never enters the all-zero state");
      period++;
      if (q == 8'h01) break;
    end
    check(period == 255, "period is 255 cycles");
    for (int b = 0; b < W; b++) check(ones[b] == 128, "each bit is 1 in 128 of 255 states");

    // Seed load mid-run: next state is the seed, then shifting resumes.
    repeat (17) @(negedge clk);
    seed      = 8'hA5;
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;
    check(q == 8'hA5, "seed load takes effect at next edge");
    model = 8'hA5;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      model = model_next(model);
      check(q == model, "state after seed load matches model");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
