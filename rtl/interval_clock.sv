// interval_clock - displays a node's accuracy interval [C - alpha-, C + alpha+].
//
// Interval-based synchronisation represents real time by an interval that must
// contain it. This block forms its two ends from the local clock C (96-bit) and
// the two accuracy bounds (ns.frac), with the nanosecond word wrapping at 10^9
// as in the clock. One subtractor and one adder, each with a single borrow or
// carry into the seconds, suffice because a bound is used only while it is
// below one second; a bound of one second or more sets wide, and the end on
// that side is then held at C. Outputs are registered: lo/hi/wide belong to
// the time_i of the previous cycle.
// The interval [C - alpha-, C + alpha+] follows the source description; the
// one-second limit and the registered output are this design's choices.
module interval_clock
  import synutc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  ts_t  time_i,
  input  nsf_t acc_neg,
  input  nsf_t acc_pos,
  output ts_t  lo,
  output ts_t  hi,
  output logic wide
);

  localparam nsf_t ONE_SEC = {NS_PER_SEC, 32'd0};

  logic        neg_ok, pos_ok;
  logic [64:0] up;
  ts_t         lo_c, hi_c;

  always_comb begin
    neg_ok = (acc_neg < ONE_SEC);
    pos_ok = (acc_pos < ONE_SEC);

    // upper end: C + alpha+
    up = {1'b0, time_i[63:0]} + {1'b0, acc_pos};
    if (!pos_ok)                     hi_c = time_i;
    else if (up >= {1'b0, ONE_SEC})  hi_c = {time_i[95:64] + 32'd1, nsf_t'(up - {1'b0, ONE_SEC})};
    else                             hi_c = {time_i[95:64], up[63:0]};

    // lower end: C - alpha-
    if (!neg_ok)                     lo_c = time_i;
    else if (time_i[63:0] >= acc_neg) lo_c = {time_i[95:64], time_i[63:0] - acc_neg};
    else                             lo_c = {time_i[95:64] - 32'd1, time_i[63:0] + ONE_SEC - acc_neg};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo   <= '0;
      hi   <= '0;
      wide <= 1'b1;
    end else begin
      lo   <= lo_c;
      hi   <= hi_c;
      wide <= !(neg_ok && pos_ok);
    end
  end

endmodule
