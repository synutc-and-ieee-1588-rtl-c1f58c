// event_generator - activates output pins at programmed points in time.
//
// For each of N channels the CPU writes a 96-bit time with arm. While armed, the
// channel compares the local time with it; in the first cycle with
// time_i >= cmp_time the pin goes high (registered, one cycle later) and the
// channel disarms. The pin stays high until clr. Arming a time already passed
// fires at once.
//
// Activating pins at programmable times follows the source description; the
// level output, the >= test and the arm/clr handshake are this design's choices.
module event_generator
  import synutc_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ts_t          time_i,
  input  logic [N-1:0] arm,
  input  ts_t          cmp_time [N],
  input  logic [N-1:0] clr,
  output logic [N-1:0] out,
  output logic [N-1:0] armed
);

  ts_t cmp_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out   <= '0;
      armed <= '0;
      for (int i = 0; i < N; i++) cmp_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (arm[i]) begin
          cmp_q[i] <= cmp_time[i];
          armed[i] <= 1'b1;
        end else if (armed[i] && (time_i >= cmp_q[i])) begin
          armed[i] <= 1'b0;
          out[i]   <= 1'b1;
        end
        if (clr[i]) out[i] <= 1'b0;
      end
    end
  end

endmodule
