// ht8051_top_tb: end-to-end test of the password system with its Trojan,
// driven and observed only through the board UART pins at 8 clocks per
// bit. Instance t1 has the default configuration (5-byte fixed-length
// entries, sequential trigger), t2 takes Enter-terminated entries with the
// one-time trigger, t3 fixed-length entries received without compares. The testbench types entries as 8N1 frames, decodes
// what the system prints, and checks each reply against the outcome worked
// out from the rules: the right password opens, a wrong one does not, the
// full trigger sequence opens on its last entry whatever the password, the
// Trojan disarms after one use, a broken sequence restarts, and with the
// switches away from "10" the UART belongs to the other user and the
// micro-controller hears nothing. Every mechanism is counted, and one that
// never happened counts as a failure.
module ht8051_top_tb;
  import ht8051_pkg::*;

  localparam int CPB = 8;
  localparam int NI = 3;

  logic clk = 0, rst_n = 0;
  logic [2:1] sw [NI];
  logic rxd [NI], txd [NI], alt_rxd [NI], alt_txd [NI], gr [NI], dn [NI];
  string printed [NI];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_honest_grant = 0, n_honest_deny = 0, n_trojan_grant = 0;
  int n_armed = 0, n_restart = 0, n_primed = 0, n_alt_route = 0, n_disarm = 0;

  ht8051_top #(.CLKS_PER_BIT(CPB)) t1 (
    .clk, .rst_n, .sw(sw[0]), .uart_rxd(rxd[0]), .uart_txd(txd[0]),
    .alt_rxd(alt_rxd[0]), .alt_txd(alt_txd[0]),
    .access_granted(gr[0]), .access_denied(dn[0]));
  ht8051_top #(.CLKS_PER_BIT(CPB), .RX_MODE(RX_VARIABLE), .TRIGGER(TRIG_ONE_TIME)) t2 (
    .clk, .rst_n, .sw(sw[1]), .uart_rxd(rxd[1]), .uart_txd(txd[1]),
    .alt_rxd(alt_rxd[1]), .alt_txd(alt_txd[1]),
    .access_granted(gr[1]), .access_denied(dn[1]));
  ht8051_top #(.CLKS_PER_BIT(CPB), .RX_MODE(RX_UNROLLED)) t3 (
    .clk, .rst_n, .sw(sw[2]), .uart_rxd(rxd[2]), .uart_txd(txd[2]),
    .alt_rxd(alt_rxd[2]), .alt_txd(alt_txd[2]),
    .access_granted(gr[2]), .access_denied(dn[2]));

  always #5 clk = ~clk;

  // observe the Trojan from outside its ports
  logic arm1_q = 0, arm2_q = 0, arm3_q = 0, pri2_q = 0;
  logic [3:0] step1_q = 0;
  always @(posedge clk) if (rst_n) begin
    arm1_q  <= t1.armed;
    arm2_q  <= t2.armed;
    arm3_q  <= t3.armed;
    if (t3.armed && !arm3_q) n_armed++;
    if (!t3.armed && arm3_q) n_disarm++;
    pri2_q  <= t2.primed;
    step1_q <= t1.trig_step;
    if (t1.armed && !arm1_q) n_armed++;
    if (t2.armed && !arm2_q) n_armed++;
    if ((!t1.armed && arm1_q) || (!t2.armed && arm2_q)) n_disarm++;
    if (t2.primed && !pri2_q) n_primed++;
    if (step1_q > 1 && t1.trig_step == 1) n_restart++;
  end

  // UART receivers that decode what each instance prints
  for (genvar g = 0; g < NI; g++) begin : g_mon
    initial begin
      logic [7:0] b;
      wait (rst_n);
      forever begin
        @(negedge txd[g]);
        repeat (CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(posedge clk);
          b[i] = txd[g];
        end
        repeat (CPB) @(posedge clk);
        if (txd[g] !== 1'b1) begin failures++; $display("FAIL stop bit on instance %0d", g); end
        printed[g] = {printed[g], string'(b)};
      end
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_byte(int w, logic [7:0] b);
    @(negedge clk);
    rxd[w] = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd[w] = b[i]; repeat (CPB) @(negedge clk); end
    rxd[w] = 1; repeat (2 * CPB) @(negedge clk);
  endtask

  function automatic bit ends_with(string s, string tail);
    if (s.len() < tail.len()) return 0;
    return s.substr(s.len() - tail.len(), s.len() - 1) == tail;
  endfunction

  task automatic wait_prompt(int w);
    while (!ends_with(printed[w], "ENTER PASSWORD\r\n")) @(negedge clk);
  endtask

  // type one entry after the prompt and check the reply
  task automatic attempt(int w, string s, bit exp_grant, bit by_trojan);
    wait_prompt(w);
    printed[w] = "";
    foreach (s[i]) send_byte(w, s[i]);
    wait_prompt(w);
    check_str($sformatf("reply to \"%s\"", s), printed[w],
              exp_grant ? "ACCESS GRANTED\r\nENTER PASSWORD\r\n"
                        : "ACCESS DENIED\r\nENTER PASSWORD\r\n");
    if (ends_with(printed[w], "ENTER PASSWORD\r\n") && printed[w].len() > 16) begin
      if (printed[w].substr(7, 7) == "G") begin
        if (by_trojan) n_trojan_grant++; else n_honest_grant++;
      end else n_honest_deny++;
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) begin
      sw[i] = 2'b10; rxd[i] = 1; alt_txd[i] = 1; printed[i] = "";
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait_prompt(0);
    check_str("first prompt", printed[0], "ENTER PASSWORD\r\n");

    // ---- t1: fixed-length entries, sequential trigger ----
    attempt(0, "MAGIC", 1, 0);
    attempt(0, "HELLO", 0, 0);
    // the trigger sequence of the attack: *, 5 x #, *, #####
    attempt(0, "*AGIC", 0, 0);
    for (int i = 0; i < 5; i++) attempt(0, "#AGIC", 0, 0);
    attempt(0, "*AGIC", 0, 0);
    check("t1 not armed before last entry", t1.armed, 0);
    attempt(0, "#####", 1, 1);
    attempt(0, "#####", 0, 0);            // single use
    // broken sequence: '*' where a '#' is due restarts at step 1
    attempt(0, "*AGIC", 0, 0);
    attempt(0, "#AGIC", 0, 0);
    attempt(0, "*BCDE", 0, 0);
    check("t1 restarted", t1.trig_step, 1);
    for (int i = 0; i < 5; i++) attempt(0, "#1234", 0, 0);
    attempt(0, "*9999", 0, 0);
    attempt(0, "#####", 1, 1);
    attempt(0, "MAGIX", 0, 0);

    // switches away from "10": the other UART user has the pins
    wait_prompt(0);
    sw[0] = 2'b00;
    printed[0] = "";
    fork
      send_byte(0, "M");
      begin
        int same, total;
        same = 0; total = 0;
        repeat (9 * CPB) begin
          @(posedge clk);
          total++;
          if (alt_rxd[0] == rxd[0]) same++;
        end
        check("alt sees the board line", same, total);
      end
    join
    alt_txd[0] = 0; @(negedge clk);
    check("board tx from alt user", txd[0], 0);
    alt_txd[0] = 1; @(negedge clk);
    check("board tx from alt user idle", txd[0], 1);
    check("mcu heard nothing", t1.u_chk.ent_len, 0);
    n_alt_route++;
    repeat (12 * CPB) @(negedge clk);  // let the monitor drop the alt pulse
    sw[0] = 2'b10;
    repeat (4) @(negedge clk);
    printed[0] = "ENTER PASSWORD\r\n";
    attempt(0, "MAGIC", 1, 0);

    // ---- t2: Enter-terminated entries, one-time trigger ----
    attempt(1, "MAGIC\n", 1, 0);
    attempt(1, "MAGICS\n", 0, 0);
    attempt(1, "*#####*\n", 0, 0);        // primes the Trojan
    check("t2 primed", t2.primed, 1);
    attempt(1, "letmein\n", 1, 1);        // next attempt opens
    attempt(1, "letmein\n", 0, 0);

    // ---- t3: fixed-length straight-line reception, sequential trigger ----
    attempt(2, "MAGIC", 1, 0);
    attempt(2, "*AGIC", 0, 0);
    for (int i = 0; i < 5; i++) attempt(2, "#AGIC", 0, 0);
    attempt(2, "*AGIC", 0, 0);
    attempt(2, "#####", 1, 1);
    attempt(2, "#####", 0, 0);

    check("honest grants",  n_honest_grant > 0, 1);
    check("honest denials", n_honest_deny > 0, 1);
    check("trojan grants",  n_trojan_grant, 4);
    check("armings",        n_armed, 4);
    check("disarms",        n_disarm, 4);
    check("primings",       n_primed, 1);
    check("restarts",       n_restart > 0, 1);
    check("alt routing",    n_alt_route, 1);
    $display("mechanisms: honest_grant=%0d honest_deny=%0d trojan_grant=%0d armed=%0d disarm=%0d primed=%0d restart=%0d alt_route=%0d",
             n_honest_grant, n_honest_deny, n_trojan_grant, n_armed, n_disarm, n_primed, n_restart, n_alt_route);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
