// tb_accuracy_clock - self-checking testbench for accuracy_clock.
//
// Loads a bound, sets a deterioration rate and checks that the bound grows by
// exactly rate per cycle (bound after k cycles = load + k*rate, computed here
// from the cycle count), that a new load replaces it one cycle later, that a
// rate change takes effect on the next cycle and that the bound saturates.
module tb_accuracy_clock;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load = 1'b0, rate_stb = 1'b0;
  logic [63:0] load_val = '0, rate = '0, alpha, rate_o;
  int          checks = 0, failures = 0;

  accuracy_clock #(.W(64)) dut (.clk, .rst_n, .load, .load_val, .rate_stb, .rate, .alpha, .rate_o);

  always #5 clk = ~clk;

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] base, r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_eq(alpha, '1, "reset value");
    // load 20 ns, rate 0.25 ns per tick
    base = 64'h0000_0014_0000_0000;
    r    = 64'h0000_0000_4000_0000;
    load = 1'b1; load_val = base; rate_stb = 1'b1; rate = r;
    @(negedge clk);
    load = 1'b0; rate_stb = 1'b0;
    expect_eq(alpha, base, "loaded bound");
    for (int k = 1; k <= 200; k++) begin
      @(negedge clk);
      expect_eq(alpha, base + 64'(k) * r, "deterioration");
    end
    // new rate: 3 ns per tick
    base = alpha; r = 64'h0000_0003_0000_0000;
    rate_stb = 1'b1; rate = r;
    @(negedge clk);
    rate_stb = 1'b0;
    expect_eq(alpha, base + 64'h0000_0000_4000_0000, "old rate for the strobe cycle");
    base = alpha;
    for (int k = 1; k <= 50; k++) begin
      @(negedge clk);
      expect_eq(alpha, base + 64'(k) * r, "new rate");
    end
    // saturation
    load = 1'b1; load_val = 64'hFFFF_FFFF_0000_0000; rate_stb = 1'b1; rate = 64'h0000_0000_8000_0000;
    @(negedge clk);
    load = 1'b0; rate_stb = 1'b0;
    @(negedge clk);
    expect_eq(alpha, 64'hFFFF_FFFF_8000_0000, "near top");
    @(negedge clk);
    expect_eq(alpha, '1, "saturated");
    @(negedge clk);
    expect_eq(alpha, '1, "stays saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
