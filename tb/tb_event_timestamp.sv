// tb_event_timestamp - self-checking testbench for event_timestamp.
//
// The time input is a plain cycle counter. Edges are driven on chosen cycles;
// the captured value must equal the counter value 2 cycles after the pin was
// sampled high. Also checks that channels are independent, that valid holds the
// value, that a second edge sets overrun without overwriting, and clr.
module tb_event_timestamp;
  import synutc_pkg::*;
  localparam int N = 3;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] ev = '0, clr = '0, valid, overrun;
  ts_t          time_i = '0;
  ts_t          ts [N];
  int           checks = 0, failures = 0;

  event_timestamp #(.N(N)) dut (.clk, .rst_n, .ev, .time_i, .clr, .ts, .valid, .overrun);

  always #5 clk = ~clk;
  always @(posedge clk) time_i <= time_i + 96'd1;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_t t_edge [N];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      ev[i] = 1'b1;
      t_edge[i] = time_i;           // counter value at the next sampling edge is time_i+... see below
      repeat (7 + i * 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      // pin sampled at the posedge where time_i becomes t_edge+1; captured 2 cycles later
      chk(valid[i], "valid set");
      chk(ts[i] == t_edge[i] + 96'd2, $sformatf("timestamp ch%0d: %0d vs %0d", i, ts[i], t_edge[i] + 2));
      chk(!overrun[i], "no overrun");
    end
    // second edge on channel 1 while valid: overrun, value kept
    ev[1] = 1'b0; repeat (4) @(negedge clk);
    ev[1] = 1'b1; repeat (6) @(negedge clk);
    chk(overrun[1], "overrun set");
    chk(ts[1] == t_edge[1] + 96'd2, "value kept on overrun");
    // clear, then capture a new edge
    clr[1] = 1'b1; @(negedge clk); clr[1] = 1'b0;
    chk(!valid[1] && !overrun[1], "cleared");
    ev[1] = 1'b0; repeat (4) @(negedge clk);
    ev[1] = 1'b1; t_edge[1] = time_i; repeat (6) @(negedge clk);
    chk(valid[1] && ts[1] == t_edge[1] + 96'd2, "new capture after clear");
    chk(valid[0] && valid[2], "other channels untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
