// ht8051_top_full_tb: the password system at its default configuration
// (9600 baud at 5208 clocks per bit, "MAGIC", fixed-length entries,
// sequential trigger), driven through the board UART exactly as a PC
// terminal would. It checks the prompt, an honest login, a wrong password,
// and the complete eight-entry trigger sequence whose last entry is
// granted although it is not the password, then that the Trojan is spent.
// Each reply is decoded from the transmit pin and compared with the
// expected text.
module ht8051_top_full_tb;
  localparam int CPB = 5208;  // must match the top's default

  logic clk = 0, rst_n = 0;
  logic [2:1] sw = 2'b10;
  logic rxd = 1, txd, alt_rxd, alt_txd = 1, gr, dn;
  string printed = "";
  int checks = 0, failures = 0, n_grant = 0, n_deny = 0;

  ht8051_top dut (
    .clk, .rst_n, .sw, .uart_rxd(rxd), .uart_txd(txd),
    .alt_rxd, .alt_txd, .access_granted(gr), .access_denied(dn));

  always #10 clk = ~clk;  // 50 MHz

  always @(posedge clk) if (rst_n) begin
    if (gr) n_grant++;
    if (dn) n_deny++;
  end

  initial begin
    logic [7:0] b;
    wait (rst_n);
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      printed = {printed, string'(b)};
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic check_str(string what, string got, string exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=\"%s\" exp=\"%s\"", what, got, exp);
    end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(logic [7:0] v);
    @(negedge clk);
    rxd = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = v[i]; repeat (CPB) @(negedge clk); end
    rxd = 1; repeat (CPB) @(negedge clk);
  endtask

  function automatic bit ends_with(string s, string tail);
    if (s.len() < tail.len()) return 0;
    return s.substr(s.len() - tail.len(), s.len() - 1) == tail;
  endfunction

  task automatic wait_prompt();
    while (!ends_with(printed, "ENTER PASSWORD\r\n")) @(negedge clk);
  endtask

  task automatic attempt(string s, bit exp_grant);
    int g0 = n_grant, d0 = n_deny;
    wait_prompt();
    printed = "";
    foreach (s[i]) send_byte(s[i]);
    wait_prompt();
    check_str($sformatf("reply to \"%s\"", s), printed,
              exp_grant ? "ACCESS GRANTED\r\nENTER PASSWORD\r\n"
                        : "ACCESS DENIED\r\nENTER PASSWORD\r\n");
    check("granted pulses", n_grant - g0, exp_grant ? 1 : 0);
    check("denied pulses",  n_deny - d0,  exp_grant ? 0 : 1);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait_prompt();
    check_str("prompt", printed, "ENTER PASSWORD\r\n");
    attempt("MAGIC", 1);
    attempt("MAGIK", 0);
    attempt("*0000", 0);
    for (int i = 0; i < 5; i++) attempt("#0000", 0);
    attempt("*0000", 0);
    attempt("#####", 1);
    attempt("#####", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
