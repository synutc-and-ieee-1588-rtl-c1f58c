// tb_interval_clock - self-checking testbench for interval_clock.
//
// Random clock values (including nanosecond values close to both ends of a
// second) and random bounds below and above one second are applied; the ends of
// the interval are compared, one cycle later, with values worked out as 128-bit
// counts of 2^-32 ns.
module tb_interval_clock;
  import synutc_pkg::*;
  import tb_eth_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  ts_t  time_i = '0, lo, hi;
  nsf_t acc_neg = '0, acc_pos = '0;
  logic wide;
  int   checks = 0, failures = 0, n_wrap_up = 0, n_wrap_dn = 0, n_wide = 0;

  interval_clock dut (.clk, .rst_n, .time_i, .acc_neg, .acc_pos, .lo, .hi, .wide);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic nsf_t rnd_bound();
    case ($urandom_range(0, 9))
      0:       return {32'd1_000_000_000 + $urandom_range(0, 1000), $urandom()};   // too wide
      1, 2:    return {32'($urandom_range(0, 999_999_999)), $urandom()};
      default: return {32'($urandom_range(0, 5000)), $urandom()};
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 5000; k++) begin
      logic [31:0] ns;
      ts_t c;
      logic [127:0] u, a_n, a_p;
      logic w;
      case ($urandom_range(0, 2))
        0:       ns = 32'($urandom_range(0, 3000));
        1:       ns = 32'(999_997_000 + $urandom_range(0, 2999));
        default: ns = 32'($urandom_range(0, 999_999_999));
      endcase
      c = {32'($urandom_range(1, 1 << 30)), ns, $urandom()};
      time_i = c; acc_neg = rnd_bound(); acc_pos = rnd_bound();
      @(negedge clk);
      u = ts_units(c); a_n = 128'(acc_neg); a_p = 128'(acc_pos);
      w = (acc_neg[63:32] >= 32'd1_000_000_000) || (acc_pos[63:32] >= 32'd1_000_000_000);
      checks++;
      if (wide !== w) begin failures++; $display("FAIL wide"); end
      if (w) n_wide++;
      if (acc_pos[63:32] < 32'd1_000_000_000) begin
        checks++;
        if (hi !== units_ts(u + a_p)) begin failures++; $display("FAIL hi %h %h", hi, units_ts(u + a_p)); end
        if (units_ts(u + a_p)[95:64] != c[95:64]) n_wrap_up++;
      end
      if (acc_neg[63:32] < 32'd1_000_000_000) begin
        checks++;
        if (lo !== units_ts(u - a_n)) begin failures++; $display("FAIL lo %h %h", lo, units_ts(u - a_n)); end
        if (units_ts(u - a_n)[95:64] != c[95:64]) n_wrap_dn++;
      end
    end
    checks++;
    if (n_wrap_up == 0 || n_wrap_dn == 0 || n_wide == 0) begin failures++; $display("FAIL coverage"); end
    $display("wraps up %0d down %0d wide %0d", n_wrap_up, n_wrap_dn, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
