// tb_adder_clock - self-checking testbench for adder_clock.
//
// A reference model keeps time as one 128-bit count of 2^-32 ns units and adds
// the increment (plus the amortization correction while one runs) every cycle;
// it converts to {sec, ns, frac} by division, so the nanosecond wrap at 10^9 is
// checked independently of the clock's compare-and-subtract. The clock's output
// is compared every cycle, with its one-cycle pipeline lag. Scenario: free run,
// a load just t_before a second boundary, rate changes, a positive and a negative
// amortization (the total slew ticks*delta is checked), a load during an
// amortization-free run, and the latency of a load (visible t_after one cycle).
module tb_adder_clock;
  import synutc_pkg::*;

  localparam logic [127:0] SEC_U = 128'(NS_PER_SEC) << 32;

  logic      clk = 1'b0, rst_n = 1'b0;
  clk_ctrl_t ctrl;
  ts_t       time_o;
  nsf_t      inc_o;
  logic      amort_busy;
  int        checks = 0, failures = 0;

  adder_clock dut (.clk, .rst_n, .ctrl, .time_o, .inc_o, .amort_busy);

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  logic [127:0] tot = '0, exp_tot = '0;
  logic [63:0]  m_inc = 64'h0000_000A_0000_0000;
  logic [63:0]  m_delta = '0;
  logic [31:0]  m_left = '0;

  function automatic ts_t to_ts(logic [127:0] t);
    logic [127:0] s, r;
    s = t / SEC_U;
    r = t % SEC_U;
    return {s[31:0], r[63:0]};
  endfunction

  function automatic logic [127:0] from_ts(ts_t v);
    return 128'(v[95:64]) * SEC_U + 128'(v[63:0]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    logic [63:0] step;
    step = m_inc + ((m_left != 0) ? m_delta : 64'd0);
    exp_tot <= ctrl.load_stb ? from_ts(ctrl.load_val) : tot;
    tot     <= (ctrl.load_stb ? from_ts(ctrl.load_val) : tot) + 128'(step);
    if (ctrl.inc_stb) m_inc <= ctrl.inc;
    if (ctrl.amort_stb) begin m_left <= ctrl.amort_ticks; m_delta <= ctrl.amort_delta; end
    else if (m_left != 0) m_left <= m_left - 1;
  end

  // compare on the falling edge, t_after both have settled
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (time_o !== to_ts(exp_tot)) begin
      failures++;
      if (failures < 10) $display("MISMATCH t=%0t dut=%h exp=%h", $time, time_o, to_ts(exp_tot));
    end
  end

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic idle();
    ctrl = '0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_t t_before, t_after;
    ctrl = '0;
    tick(2);
    rst_n = 1'b1;
    tick(50);

    // load close to a second boundary: 5 s + 999 999 900 ns
    @(negedge clk);
    ctrl.load_stb = 1'b1;
    ctrl.load_val = {32'd5, 32'd999_999_900, 32'h8000_0000};
    @(negedge clk);
    idle();
    checks++;
    if (time_o !== {32'd5, 32'd999_999_900, 32'h8000_0000}) begin
      failures++; $display("load not visible t_after one cycle: %h", time_o);
    end
    tick(30);
    checks++;
    if (time_o[95:64] !== 32'd6) begin failures++; $display("second did not roll over"); end

    // rate change: 10.000000001 ns per tick, then a fractional increment
    ctrl.inc_stb = 1'b1; ctrl.inc = 64'h0000_000A_0000_0004;
    tick(); idle(); tick(200);
    ctrl.inc_stb = 1'b1; ctrl.inc = 64'h0000_0007_5555_5555;  // 7.333 ns (136.4 MHz)
    tick(); idle(); tick(300);

    // positive amortization: +0.5 ns per tick for 100 ticks = +50 ns
    t_before = time_o;
    ctrl.amort_stb = 1'b1; ctrl.amort_delta = 64'h0000_0000_8000_0000; ctrl.amort_ticks = 32'd100;
    tick(); idle();
    checks++;
    if (!amort_busy) begin failures++; $display("amort_busy not set"); end
    tick(150);
    checks++;
    if (amort_busy) begin failures++; $display("amortization did not end"); end
    t_after = time_o;
    checks++;
    if (from_ts(t_after) - from_ts(t_before) != 128'(151) * 128'h7_5555_5555 + 128'(100) * 128'h8000_0000) begin
      failures++; $display("amortization slew wrong");
    end

    // negative amortization: -1 ns per tick for 1000 ticks
    ctrl.amort_stb = 1'b1; ctrl.amort_delta = -64'sh0000_0001_0000_0000; ctrl.amort_ticks = 32'd1000;
    tick(); idle(); tick(1100);

    // load while running, then let it cross several seconds quickly with a large increment
    ctrl.load_stb = 1'b1; ctrl.load_val = {32'd100, 32'd0, 32'd0};
    ctrl.inc_stb = 1'b1; ctrl.inc = {32'd333_333_333, 32'd0};
    tick(); idle(); tick(20);
    checks++;
    if (time_o[95:64] < 32'd105) begin failures++; $display("seconds not advancing: %h", time_o); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
