// adder_clock - 96-bit adder-based local clock with rate adjustment and
// linear continuous amortization.
//
// Instead of counting oscillator ticks, the clock adds a programmable increment
// (the oscillator period in ns.frac) on every tick, so any oscillator frequency
// can pace it and the rate can be trimmed in steps of 2^-32 ns per tick. A state
// correction is not applied as a jump: an amortization adds a signed correction
// to the increment for a programmed number of ticks, so the clock is slewed
// linearly by ticks*delta. A load sets the state directly (resynchronisation).
//
// Time format {seconds, nanoseconds, fraction}: the nanosecond word wraps at
// 10^9, as in the IEEE 1588 time format. The clock is pipelined in two stages:
// the 64-bit ns.frac adder with its wrap, and the 32-bit seconds incrementer fed
// by a registered carry. The ns.frac word is delayed by one register so that
// time_o is always coherent; time_o lags the adder by one cycle. A load is
// shown on time_o in the cycle after the strobe and advances normally from then
// on, so a loaded value L behaves as if the clock had shown L all along.
//
// The 96-bit width, the IEEE 1588 seconds/nanoseconds split, the rate
// adjustment, amortization and pipelining follow the source description; the
// 32-bit fraction, the command encoding and the two-stage split are this
// design's choices. The increment (plus any correction) must lie between 0 and
// one second.
module adder_clock
  import synutc_pkg::*;
#(
  parameter nsf_t INC_RESET = 64'h0000_000A_0000_0000  // 10 ns per tick (100 MHz)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  clk_ctrl_t ctrl,
  output ts_t       time_o,
  output nsf_t      inc_o,       // increment in use
  output logic      amort_busy   // amortization in progress
);

  nsf_t        inc_q;
  nsf_t        lower_q;      // stage 1: ns.frac accumulator
  logic        carry_q;      // stage 1 -> 2: seconds carry
  logic [31:0] sec_q;        // stage 2: seconds
  nsf_t        lower_d_q;    // ns.frac aligned with sec_q
  logic [31:0] amort_left_q;
  logic [63:0] amort_delta_q;

  nsf_t        step;
  nsf_t        base;         // value the adder advances: the state, or a loaded value
  logic [64:0] sum;
  logic        wrap;

  always_comb begin
    step = inc_q + ((amort_left_q != 0) ? amort_delta_q : 64'd0);
    base = ctrl.load_stb ? ctrl.load_val[63:0] : lower_q;
    sum  = {1'b0, base} + {1'b0, step};
    wrap = (sum[64:32] >= {1'b0, NS_PER_SEC});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q         <= INC_RESET;
      lower_q       <= '0;
      carry_q       <= 1'b0;
      sec_q         <= '0;
      lower_d_q     <= '0;
      amort_left_q  <= '0;
      amort_delta_q <= '0;
    end else begin
      if (ctrl.inc_stb) inc_q <= ctrl.inc;

      if (ctrl.amort_stb) begin
        amort_left_q  <= ctrl.amort_ticks;
        amort_delta_q <= ctrl.amort_delta;
      end else if (amort_left_q != 0) begin
        amort_left_q  <= amort_left_q - 1'b1;
      end

      // stage 1 runs one tick ahead of the output; a load enters both stages
      lower_q <= wrap ? nsf_t'(sum - {1'b0, NS_PER_SEC, 32'd0}) : sum[63:0];
      carry_q <= wrap;
      if (ctrl.load_stb) begin
        lower_d_q <= ctrl.load_val[63:0];
        sec_q     <= ctrl.load_val[95:64];
      end else begin
        sec_q     <= sec_q + {31'd0, carry_q};
        lower_d_q <= lower_q;
      end
    end
  end

  assign time_o     = {sec_q, lower_d_q};
  assign inc_o      = inc_q;
  assign amort_busy = (amort_left_q != 0);

endmodule
