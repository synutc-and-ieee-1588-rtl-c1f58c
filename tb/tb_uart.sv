// tb_uart - self-checking testbench for uart, with a small bit period.
//
// The transmitter's output is looped back to the receiver. Random bytes are sent;
// each must come back intact, and the transmitter must hold each bit for exactly
// DIV cycles (10*DIV cycles per frame, measured). A frame with a low stop bit,
// driven directly, must raise rx_err instead of rx_valid.
module tb_uart;
  localparam int DIV = 16;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] tx_data = '0, rx_data;
  logic       tx_start = 1'b0, tx_busy, txd, rx_valid, rx_err;
  logic       loop = 1'b1, drv = 1'b1;
  int         checks = 0, failures = 0;

  uart #(.DIV(DIV)) dut (.clk, .rst_n, .tx_data, .tx_start, .tx_busy, .txd,
                         .rxd(loop ? txd : drv), .rx_data, .rx_valid, .rx_err);

  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [7:0] b;
      int cyc, got;
      b = 8'($urandom);
      tx_data = b; tx_start = 1'b1;
      @(negedge clk);
      tx_start = 1'b0;
      cyc = 1;
      got = 0;
      while (tx_busy) begin
        if (rx_valid) begin
          got++;
          chk(rx_data == b, $sformatf("byte %h received as %h", b, rx_data));
        end
        @(negedge clk);
        cyc++;
      end
      chk(cyc == 10 * DIV + 1, $sformatf("frame length %0d cycles", cyc));
      repeat (DIV) begin
        if (rx_valid) begin
          got++;
          chk(rx_data == b, $sformatf("byte %h received as %h", b, rx_data));
        end
        @(negedge clk);
      end
      chk(got == 1, "exactly one byte received");
    end
    // framing error: start, 8 ones, low stop bit
    loop = 1'b0;
    begin
      int errs;
      errs = 0;
      drv = 1'b0; repeat (DIV) @(negedge clk);
      drv = 1'b1; repeat (8 * DIV) @(negedge clk);
      drv = 1'b0;
      repeat (DIV) begin if (rx_err) errs++; chk(!rx_valid, "no byte on framing error"); @(negedge clk); end
      drv = 1'b1;
      repeat (2 * DIV) begin if (rx_err) errs++; @(negedge clk); end
      chk(errs == 1, "framing error flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
