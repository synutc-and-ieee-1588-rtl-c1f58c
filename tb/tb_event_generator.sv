// tb_event_generator - self-checking testbench for event_generator.
//
// Time is a counter advancing by 10 per cycle, so compare values that fall
// between two clock values are exercised. For each channel the pin must rise in
// the cycle after the first time value >= the programmed time (worked out here
// from the counter), never earlier, stay high until clr, and an already passed
// time must fire immediately.
module tb_event_generator;
  import synutc_pkg::*;
  localparam int N = 2;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] arm = '0, clr = '0, out, armed;
  ts_t          time_i = '0;
  ts_t          cmp_time [N];
  int           checks = 0, failures = 0;
  int           fire_seen [N];

  event_generator #(.N(N)) dut (.clk, .rst_n, .time_i, .arm, .cmp_time, .clr, .out, .armed);

  always #5 clk = ~clk;
  always @(posedge clk) time_i <= time_i + 96'd10;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at time_i=%0d", what, time_i); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ts_t target [N];
    cmp_time[0] = '0; cmp_time[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    target[0] = time_i + 96'd203;   // between two clock values
    target[1] = time_i + 96'd500;   // exactly a clock value
    cmp_time[0] = target[0]; cmp_time[1] = target[1];
    arm = 2'b11;
    @(negedge clk);
    arm = 2'b00;
    chk(armed == 2'b11, "armed");
    // watch the pins every cycle
    for (int c = 0; c < 80; c++) begin
      for (int i = 0; i < N; i++) begin
        // the pin is registered: it reflects the comparison made at the previous edge,
        // when time_i was 10 less than now
        logic should;
        should = (time_i - 96'd10) >= target[i];
        chk(out[i] == should, $sformatf("pin %0d level", i));
      end
      @(negedge clk);
    end
    chk(armed == 2'b00, "disarmed after firing");
    clr = 2'b01; @(negedge clk); clr = 2'b00;
    chk(out == 2'b10, "clr drops only its pin");
    // a time already passed fires at once
    cmp_time[0] = 96'd5; arm = 2'b01; @(negedge clk); arm = 2'b00;
    chk(out[0] == 1'b0, "not yet");
    @(negedge clk);
    chk(out[0] == 1'b1, "past time fires in the next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
