// uart_tx_tb: sends a set of bytes and decodes the line in the middle of
// every bit period, checking start bit, data bits (LSB first), stop bit,
// that `busy` lasts exactly ten bit periods, that `done` pulses once per
// byte and that a `start` while busy is ignored.
module uart_tx_tb;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0, start = 0, txd, busy, done;
  logic [7:0] data;
  int checks = 0, failures = 0, done_cnt = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && done) done_cnt++;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_and_decode(logic [7:0] b);
    logic [7:0] got;
    int busy_cycles;
    @(negedge clk);
    data = b; start = 1;
    @(negedge clk);
    start = 0;
    data = ~b;               // must not matter after the load
    // start bit: line low, sample middle
    repeat (CPB/2 - 1) @(negedge clk);
    check("start bit", txd, 0);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      got[i] = txd;
      if (i == 3) begin      // a start while busy is ignored
        start = 1; @(negedge clk); start = 0;
        repeat (CPB - 1) @(negedge clk);
        i++;
        got[i] = txd;
      end
    end
    check("data", got, b);
    repeat (CPB) @(negedge clk);
    check("stop bit", txd, 1);
    check("busy in stop", busy, 1);
    busy_cycles = 0;
    while (busy) begin @(negedge clk); busy_cycles++; end
    check("stop length", busy_cycles, CPB / 2 + 1);
    check("idle line", txd, 1);
  endtask

  initial begin
    data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check("idle after reset", txd, 1);
    send_and_decode(8'h4D);
    send_and_decode(8'hA5);
    send_and_decode(8'h00);
    send_and_decode(8'hFF);
    for (int k = 0; k < 6; k++) send_and_decode(8'($urandom));
    repeat (2) @(negedge clk);
    check("done pulses", done_cnt, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
