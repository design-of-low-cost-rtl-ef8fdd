// tb_sng_dff -- self-checking testbench for sng_dff.
//
// Checks that reset forces RESET_VALUE and that q follows d one clock edge
// later for a random data sequence. Reference: the previous d value held in
// the testbench.
module tb_sng_dff;

  logic clk = 1'b0;
  logic rst_n;
  logic d;
  logic q;
  int   checks   = 0;
  int   failures = 0;

  sng_dff #(.RESET_VALUE(1'b1)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    logic expected;
    rst_n = 1'b0;
    d     = 1'b0;
    #12;
    check(q, 1'b1, "reset value");
    @(negedge clk);
    rst_n = 1'b1;
    check(q, 1'b1, "held after reset release");
    for (int n = 0; n < 200; n++) begin
      d        = 1'($urandom);
      expected = d;
      @(negedge clk);
      check(q, expected, "q follows d");
    end
    // Asynchronous reset while the clock is high.
    d = 1'b0;
    @(negedge clk);
    check(q, 1'b0, "q loaded 0");
    @(posedge clk);
    #1 rst_n = 1'b0;
    #1 check(q, 1'b1, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
