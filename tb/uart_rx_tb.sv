// uart_rx_tb: drives 8N1 frames onto the line at varying phase to the
// receiver clock, and checks every received byte, that
// `valid` pulses once per frame, that a frame with a low stop bit gives
// `frame_err` and no byte, and that a short glitch is not taken as a start
// bit.
module uart_rx_tb;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0, valid_cnt = 0, err_cnt = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (valid) begin valid_cnt++; last = data; end
    if (frame_err) err_cnt++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(logic [7:0] b, logic stop, int period);
    rxd = 0; repeat (period) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (period) @(negedge clk); end
    rxd = stop; repeat (period) @(negedge clk);
    rxd = 1; repeat (period) @(negedge clk);
  endtask

  initial begin
    int v0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      logic [7:0] b;
      b = (k < 5) ? "MAGIC" >> (8 * (4 - k)) : 8'($urandom);
      v0 = valid_cnt;
      frame(b, 1'b1, CPB);
      repeat (k % 5) @(negedge clk);  // vary the phase to the receiver
      check("one valid", valid_cnt - v0, 1);
      check("byte", last, b);
    end
    v0 = valid_cnt;
    frame(8'h3C, 1'b0, CPB);
    repeat (CPB) @(negedge clk);
    check("no byte on bad stop", valid_cnt - v0, 0);
    check("frame error", err_cnt, 1);
    // glitch of a few clocks
    rxd = 0; repeat (3) @(negedge clk); rxd = 1;
    repeat (12 * CPB) @(negedge clk);
    check("glitch ignored", valid_cnt - v0, 0);
    frame(8'h23, 1'b1, CPB);
    check("after glitch", last, 8'h23);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
