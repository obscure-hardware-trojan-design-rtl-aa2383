// password_checker_tb: runs the password program in its three reception
// styles against a model of the serial transmitter and a real CJNE unit
// whose `armed` input the testbench drives. It checks the printed texts
// byte for byte, the granted/denied result of right, wrong, short and long
// entries, the number of clocks from the last byte of an entry to the
// result (PW_LEN + 5 for fixed-length entries counted by CJNE, PW_LEN + 4
// after Enter or after the last byte of a straight-line reception), that
// the straight-line reception makes no compare while receiving, that
// bytes sent while a message is printed are ignored, and that a compare
// made while `armed` is high lets a wrong password through.
module password_checker_tb;
  import ht8051_pkg::*;

  logic  clk = 0, rst_n = 0;
  byte_t d;
  logic  v [3];
  logic  armed [3];
  logic  tx_start [3], tx_done [3], ex [3], jmp [3], gr [3], dn [3], rcv [3];
  byte_t tx_data [3], op1 [3], op2 [3];
  logic  cy [3], eq [3];
  int    checks = 0, failures = 0;
  string printed [3];
  int    granted_n [3], denied_n [3];
  int    last_rx_cyc [3], result_cyc [3], cyc = 0;

  password_checker u_fix (
    .clk, .rst_n, .rx_valid(v[0]), .rx_data(d),
    .tx_start(tx_start[0]), .tx_data(tx_data[0]), .tx_done(tx_done[0]),
    .cjne_exec(ex[0]), .cjne_op1(op1[0]), .cjne_op2(op2[0]), .cjne_jump(jmp[0]),
    .granted(gr[0]), .denied(dn[0]), .receiving(rcv[0]));
  password_checker #(.RX_MODE(RX_VARIABLE)) u_var (
    .clk, .rst_n, .rx_valid(v[1]), .rx_data(d),
    .tx_start(tx_start[1]), .tx_data(tx_data[1]), .tx_done(tx_done[1]),
    .cjne_exec(ex[1]), .cjne_op1(op1[1]), .cjne_op2(op2[1]), .cjne_jump(jmp[1]),
    .granted(gr[1]), .denied(dn[1]), .receiving(rcv[1]));
  password_checker #(.RX_MODE(RX_UNROLLED)) u_unr (
    .clk, .rst_n, .rx_valid(v[2]), .rx_data(d),
    .tx_start(tx_start[2]), .tx_data(tx_data[2]), .tx_done(tx_done[2]),
    .cjne_exec(ex[2]), .cjne_op1(op1[2]), .cjne_op2(op2[2]), .cjne_jump(jmp[2]),
    .granted(gr[2]), .denied(dn[2]), .receiving(rcv[2]));

  for (genvar g = 0; g < 3; g++) begin : g_side
    cjne_unit u_cj (.op1(op1[g]), .op2(op2[g]), .armed(armed[g]),
                    .jump(jmp[g]), .carry(cy[g]), .equal_true(eq[g]));
    // transmitter model: a byte takes 4 clocks
    int busy_left = 0;
    always @(posedge clk) if (!rst_n) tx_done[g] <= 1'b0; else begin
      tx_done[g] <= 1'b0;
      if (busy_left > 0) begin
        busy_left--;
        if (busy_left == 0) tx_done[g] <= 1'b1;
      end else if (tx_start[g]) begin
        printed[g] = {printed[g], string'(tx_data[g])};
        busy_left = 4;
      end
      if (v[g]) last_rx_cyc[g] = cyc;
      if (gr[g]) begin granted_n[g]++; result_cyc[g] = cyc; end
      if (dn[g]) begin denied_n[g]++;  result_cyc[g] = cyc; end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  int n_ex = 0;
  always @(posedge clk) if (ex[2]) n_ex++;

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int w, byte_t b);
    @(negedge clk);
    d = b; v[w] = 1;
    @(negedge clk);
    v[w] = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic wait_prompt(int w);
    while (!rcv[w]) @(negedge clk);
  endtask

  // one attempt: returns 1 for granted; checks the printed result text and
  // the next prompt; `arm` raises the armed input after the last byte
  task automatic attempt(int w, string s, bit arm, int exp_lat, output bit ok);
    int g0, d0;
    wait_prompt(w);
    printed[w] = "";
    g0 = granted_n[w]; d0 = denied_n[w];
    for (int i = 0; i < s.len(); i++) begin
      if (arm && i == s.len() - 1) begin
        @(negedge clk); d = s[i]; v[w] = 1;
        @(negedge clk); v[w] = 0; armed[w] = 1;
        repeat (3) @(negedge clk);
      end else put(w, s[i]);
    end
    while (granted_n[w] == g0 && denied_n[w] == d0) @(negedge clk);
    armed[w] = 0;
    ok = (granted_n[w] != g0);
    check("one result", (granted_n[w] - g0) + (denied_n[w] - d0), 1);
    if (exp_lat > 0) check("result latency", result_cyc[w] - last_rx_cyc[w], exp_lat);
    wait_prompt(w);
    check_str("result text", printed[w],
              ok ? "ACCESS GRANTED\r\nENTER PASSWORD\r\n" : "ACCESS DENIED\r\nENTER PASSWORD\r\n");
  endtask

  initial begin
    bit ok;
    int gn;
    d = 0; v = '{0, 0, 0}; armed = '{0, 0, 0};
    printed = '{"", "", ""};
    granted_n = '{0, 0, 0}; denied_n = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_prompt(0);
    check_str("prompt", printed[0], "ENTER PASSWORD\r\n");

    // fixed-length entries
    attempt(0, "MAGIC", 0, 10, ok);  check("fix MAGIC granted", ok, 1);
    attempt(0, "MAGIX", 0, 0, ok);   check("fix MAGIX denied", ok, 0);
    attempt(0, "magic", 0, 0, ok);   check("fix magic denied", ok, 0);
    attempt(0, "XAGIC", 0, 0, ok);   check("fix XAGIC denied", ok, 0);
    attempt(0, "#####", 1, 10, ok);  check("fix armed granted", ok, 1);
    attempt(0, "#####", 0, 0, ok);   check("fix disarmed denied", ok, 0);
    // a byte sent while the result is printed is ignored
    gn = granted_n[0];
    fork
      attempt(0, "MAGIC", 0, 10, ok);
      begin
        while (granted_n[0] == gn) @(negedge clk);
        repeat (8) @(negedge clk);
        put(0, "Z");
      end
    join
    check("fix MAGIC again", ok, 1);
    attempt(0, "MAGIC", 0, 10, ok);  check("fix after stray byte", ok, 1);

    // Enter-terminated entries
    attempt(1, "MAGIC\n", 0, 9, ok);  check("var MAGIC granted", ok, 1);
    attempt(1, "MAGI\n", 0, 0, ok);   check("var short denied", ok, 0);
    attempt(1, "MAGICX\n", 0, 0, ok); check("var long denied", ok, 0);
    attempt(1, "MAGICMAGICMAGICMAGIC\n", 0, 0, ok); check("var overlong denied", ok, 0);
    attempt(1, "MAGIC\n", 0, 9, ok);  check("var MAGIC after overlong", ok, 1);
    attempt(1, "hello\n", 1, 9, ok);  check("var armed granted", ok, 1);
    attempt(1, "hi\n", 1, 0, ok);     check("var armed short granted", ok, 1);
    attempt(1, "hello\n", 0, 0, ok);  check("var disarmed denied", ok, 0);

    // fixed length, straight-line reception without compares
    n_ex = 0;
    attempt(2, "MAGIC", 0, 9, ok);   check("unr MAGIC granted", ok, 1);
    check("unr compares: length + 5 characters", n_ex, 6);
    attempt(2, "MAGIK", 0, 0, ok);   check("unr MAGIK denied", ok, 0);
    attempt(2, "#####", 1, 9, ok);   check("unr armed granted", ok, 1);
    attempt(2, "#####", 0, 0, ok);   check("unr disarmed denied", ok, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
