// event_timestamp - timestamps rising edges on N asynchronous input pins.
//
// Application events (and the GPS 1-pps pulse) arrive at dedicated pins. Each
// pin passes a two-flop synchroniser; the cycle a rising edge is seen, the local
// 96-bit time is stored for that channel and valid is set. The value is held
// until the CPU pulses clr; an edge that arrives while valid is still set is
// not stored but sets overrun (cleared with clr).
//
// Timing: ts holds the time of the cycle that the synchronised edge is detected,
// the time 2 clock cycles after the clock edge that first sampled the pin high
// (two synchroniser flops; the edge is detected as the second flop rises).
// That constant is left to software to subtract. Timestamping events at input
// pins follows the source description; synchroniser, hold/overrun policy and the
// latency are this design's choices.
module event_timestamp
  import synutc_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ev,
  input  ts_t          time_i,
  input  logic [N-1:0] clr,
  output ts_t          ts [N],
  output logic [N-1:0] valid,
  output logic [N-1:0] overrun
);

  logic [N-1:0] s1_q, s2_q, s3_q, rise;

  assign rise = s2_q & ~s3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q    <= '0;
      s2_q    <= '0;
      s3_q    <= '0;
      valid   <= '0;
      overrun <= '0;
      for (int i = 0; i < N; i++) ts[i] <= '0;
    end else begin
      s1_q <= ev;
      s2_q <= s1_q;
      s3_q <= s2_q;
      for (int i = 0; i < N; i++) begin
        if (clr[i]) begin
          valid[i]   <= 1'b0;
          overrun[i] <= 1'b0;
        end else if (rise[i]) begin
          if (valid[i]) overrun[i] <= 1'b1;
          else begin
            ts[i]    <= time_i;
            valid[i] <= 1'b1;
          end
        end
      end
    end
  end

endmodule
