// trojan_trigger_tb: feeds three trigger instances with entries and checks
// when `armed` rises and falls. Instance A has the default configuration
// (5-byte fixed-length entries, sequential trigger), B takes Enter-terminated
// entries with the sequential trigger, C Enter-terminated entries with the
// one-time trigger. The expected outcomes are written out by hand from the
// trigger rules: the full sequence *, 5 x #, *, ##### arms; near misses
// (a missing '#' entry, a wrong last entry, six '#') do not; an entry that
// breaks the sequence but begins with '*' restarts it at step 1; the armed
// window ends with the first byte of the next entry.
module trojan_trigger_tb;
  import ht8051_pkg::*;

  logic  clk = 0, rst_n = 0;
  byte_t d;
  logic  va = 0, vb = 0, vc = 0;
  logic  arm_a, arm_b, arm_c, pri_a, pri_b, pri_c;
  logic [3:0] step_a, step_b, step_c;
  int checks = 0, failures = 0;

  trojan_trigger u_a (.clk, .rst_n, .rx_valid(va), .rx_data(d),
                      .armed(arm_a), .primed(pri_a), .step(step_a));
  trojan_trigger #(.RX_MODE(RX_VARIABLE)) u_b (.clk, .rst_n, .rx_valid(vb), .rx_data(d),
                      .armed(arm_b), .primed(pri_b), .step(step_b));
  trojan_trigger #(.RX_MODE(RX_VARIABLE), .TRIGGER(TRIG_ONE_TIME)) u_c (
                      .clk, .rst_n, .rx_valid(vc), .rx_data(d),
                      .armed(arm_c), .primed(pri_c), .step(step_c));

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one byte to instance w (0 = A, 1 = B, 2 = C), with idle clocks after it
  task automatic put(int w, byte_t b);
    @(negedge clk);
    d = b;
    va = (w == 0); vb = (w == 1); vc = (w == 2);
    @(negedge clk);
    va = 0; vb = 0; vc = 0;
    repeat (2) @(negedge clk);
  endtask

  // one entry; B and C get Enter after it
  task automatic entry(int w, string s);
    for (int i = 0; i < s.len(); i++) put(w, s[i]);
    if (w != 0) put(w, CH_ENTER);
  endtask

  task automatic seq_a(int hashes);
    entry(0, "*AGIC");
    for (int i = 0; i < hashes; i++) entry(0, "#1234");
    entry(0, "*9876");
  endtask

  initial begin
    d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- A: fixed 5-byte entries, sequential ----
    entry(0, "MAGIC");                 check("A honest entry", arm_a, 0);
    entry(0, "*AGIC");                 check("A step after *", step_a, 1);
    for (int i = 0; i < 5; i++) entry(0, "#xyzw");
    check("A step after 5 #", step_a, 6);
    entry(0, "*0000");                 check("A step after second *", step_a, 7);
    for (int i = 0; i < 4; i++) put(0, "#");
    check("A not armed before last byte", arm_a, 0);
    put(0, "#");
    check("A armed after #####", arm_a, 1);
    check("A step cleared", step_a, 0);
    repeat (10) @(negedge clk);
    check("A stays armed until next entry", arm_a, 1);
    put(0, "Q");
    check("A disarmed by next entry", arm_a, 0);
    put(0, "Q"); put(0, "Q"); put(0, "Q"); put(0, "Q");
    // one '#' entry short
    entry(0, "*AGIC");
    for (int i = 0; i < 4; i++) entry(0, "#1234");
    entry(0, "*9876");                 check("A restart on * at step 5", step_a, 1);
    entry(0, "#####");                 check("A short sequence not armed", arm_a, 0);
    check("A step 2", step_a, 2);
    entry(0, "ZZZZZ");                 check("A reset by other entry", step_a, 0);
    // wrong last entry
    seq_a(5);
    entry(0, "####A");                 check("A wrong last entry", arm_a, 0);
    check("A wrong last step", step_a, 0);
    // restart in the middle, then complete
    entry(0, "*AGIC"); entry(0, "#1234");
    entry(0, "*BBBB");                 check("A restart mid-sequence", step_a, 1);
    for (int i = 0; i < 5; i++) entry(0, "#1234");
    entry(0, "*9876");
    entry(0, "#####");                 check("A armed after restart", arm_a, 1);

    // ---- B: Enter-terminated, sequential ----
    entry(1, "*");
    for (int i = 0; i < 5; i++) entry(1, "#abc");
    entry(1, "*zz");                   check("B step 7", step_b, 7);
    entry(1, "######");                check("B six # not armed", arm_b, 0);
    entry(1, "*");
    for (int i = 0; i < 5; i++) entry(1, "#");
    entry(1, "*");
    for (int i = 0; i < 5; i++) put(1, "#");
    check("B not armed before Enter", arm_b, 0);
    put(1, CH_ENTER);                  check("B armed on Enter", arm_b, 1);
    put(1, "M");                       check("B disarmed", arm_b, 0);
    put(1, CH_ENTER);

    // ---- C: Enter-terminated, one-time ----
    entry(2, "*####*");                check("C four # not primed", pri_c, 0);
    entry(2, "*#####*");               check("C primed", pri_c, 1);
    check("C not yet armed", arm_c, 0);
    entry(2, "hello");                 check("C armed on next attempt", arm_c, 1);
    check("C prime used", pri_c, 0);
    put(2, "x");                       check("C disarmed", arm_c, 0);
    put(2, CH_ENTER);                  check("C single use", arm_c, 0);
    entry(2, "*#####*x");              check("C longer string not primed", pri_c, 0);

    check("A untouched by B/C traffic", arm_a, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
