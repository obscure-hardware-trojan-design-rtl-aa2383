// ht8051_pkg: constants and types shared by the password-protection system
// and the Trojan hidden in its compare instruction.
//
// Holds the character codes the trigger looks for ('*', '#', Enter), the
// three ways a program can collect a password (Enter-terminated entries of
// any length, or fixed-length entries counted with or without the compare
// instruction), the two trigger styles (a sequence of entries, or one entry
// holding the whole trigger string), and the texts the system prints. The
// password itself is a module parameter, "MAGIC" by default. The trigger
// characters follow the published attack and the message texts are the
// labels of the system's flow chart. Enter is the line-feed character, as
// the attack text speaks of comparing each byte with the "newline feed";
// ending the printed lines with CR LF is this design's choice.
package ht8051_pkg;

  typedef logic [7:0] byte_t;

  localparam byte_t CH_STAR  = 8'h2A;  // '*'
  localparam byte_t CH_HASH  = 8'h23;  // '#'
  localparam byte_t CH_ENTER = 8'h0A;  // line feed: the Enter key closes an entry
  localparam byte_t CH_CR    = 8'h0D;

  // How the program collects one password entry.
  typedef enum logic [1:0] {
    RX_VARIABLE  = 2'd0,  // bytes until Enter (compare with Enter by CJNE)
    RX_FIXED     = 2'd1,  // exactly PW_LEN bytes (R0 compared with zero by CJNE)
    RX_UNROLLED  = 2'd2   // exactly PW_LEN bytes, straight-line code, no CJNE
  } rx_mode_e;

  // Which trigger the Trojan listens for.
  typedef enum logic {
    TRIG_SEQUENTIAL = 1'b0,  // *, n x #, *, then an entry of n '#'
    TRIG_ONE_TIME   = 1'b1   // a single entry "*#####*", next attempt opens
  } trig_mode_e;

  // Messages printed by the checker.
  typedef enum logic [1:0] {
    MSG_PROMPT  = 2'd0,
    MSG_GRANTED = 2'd1,
    MSG_DENIED  = 2'd2
  } msg_e;


  // Length of a message in characters, including the closing CR LF.
  function automatic int unsigned msg_len(msg_e m);
    case (m)
      MSG_PROMPT:  return 16;  // "ENTER PASSWORD\r\n"
      MSG_GRANTED: return 16;  // "ACCESS GRANTED\r\n"
      default:     return 15;  // "ACCESS DENIED\r\n"
    endcase
  endfunction

  // Character idx of message m.
  function automatic byte_t msg_char(msg_e m, int unsigned idx);
    logic [8*16-1:0] s;
    int unsigned     len;
    case (m)
      MSG_PROMPT:  s = {"ENTER PASSWORD", CH_CR, CH_ENTER};
      MSG_GRANTED: s = {"ACCESS GRANTED", CH_CR, CH_ENTER};
      default:     s = {8'h00, "ACCESS DENIED", CH_CR, CH_ENTER};
    endcase
    len = msg_len(m);
    if (idx >= len) return 8'h00;
    return s[8*(len-1-idx) +: 8];
  endfunction

endpackage
