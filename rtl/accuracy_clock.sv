// accuracy_clock - adder-based clock holding one accuracy bound.
//
// A node displays its time as an interval [C - alpha-, C + alpha+]. Each bound
// is kept by one of these: on every tick it adds a programmed deterioration
// (the worst-case drift per tick, ns.frac), so the interval widens by itself
// while no resynchronisation happens. A load sets the bound and, in the same
// cycle, may set a new deterioration rate. The bound saturates at all ones.
//
// Interface: load/load_val (one-cycle strobe), rate_stb/rate, alpha (registered,
// valid the cycle after a load). The automatic deterioration follows the source
// description; width, format and saturation are this design's choices.
module accuracy_clock #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         rate_stb,
  input  logic [W-1:0] rate,
  output logic [W-1:0] alpha,
  output logic [W-1:0] rate_o
);

  logic [W-1:0] alpha_q, rate_q;
  logic [W:0]   sum;

  assign sum = {1'b0, alpha_q} + {1'b0, rate_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_q <= '1;          // nothing known about the time after reset
      rate_q  <= '0;
    end else begin
      if (rate_stb) rate_q <= rate;
      if (load)            alpha_q <= load_val;
      else if (sum[W])     alpha_q <= '1;
      else                 alpha_q <= sum[W-1:0];
    end
  end

  assign alpha  = alpha_q;
  assign rate_o = rate_q;

endmodule
