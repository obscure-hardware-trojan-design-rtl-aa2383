// password_checker: the password-based protection system that the Trojan
// defeats, written as a controller instead of 8051 program code.
//
// It loops as the system's flow chart does: print "ENTER PASSWORD", collect
// one entry from the serial port, compare it with the stored password and
// print "ACCESS GRANTED" or "ACCESS DENIED", then prompt again. An entry is
// collected in one of the three ways the attack description discusses:
//   RX_VARIABLE  each byte is stored and compared with Enter by CJNE; Enter
//                ends the entry (bytes past BUF_DEPTH are counted, not kept)
//   RX_FIXED     a counter R0 starts at PW_LEN, each byte is stored, R0 is
//                decremented and compared with zero by CJNE
//   RX_UNROLLED  PW_LEN receive-and-store steps in a row with no compare,
//                as straight-line code would do; the length is known
//                statically and no CJNE is used while receiving
// The match then uses CJNE only: first the entry length against PW_LEN,
// then each stored byte against the password byte; any "not equal" means
// denied. Every compare goes out on the cjne_* port to the shared
// cjne_unit, one compare per clock in which `cjne_exec` is high, and the
// answer (`cjne_jump`) is used in the same clock.
//
// Timing: a received byte is latched on `rx_valid` and handled in the next
// two clocks; bytes that arrive while a message is being sent are ignored.
// Matching takes PW_LEN+1 clocks. `granted` or `denied` pulses for one clock
// when the result is known, before the result message is sent. The
// password "MAGIC", the flow and the CJNE use follow the attack
// description; messages ending in CR LF, the buffer depth and the
// hardware form of the program are this design's choices.
module password_checker
  import ht8051_pkg::*;
#(
  parameter int unsigned           PW_LEN    = 5,
  parameter logic [8*PW_LEN-1:0]   PASSWORD  = "MAGIC",
  parameter rx_mode_e              RX_MODE   = RX_FIXED,
  parameter int unsigned           BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // serial port receive side (SBUF / RI)
  input  logic  rx_valid,
  input  byte_t rx_data,
  // serial port transmit side (SBUF write / TI)
  output logic  tx_start,
  output byte_t tx_data,
  input  logic  tx_done,
  // shared CJNE compare
  output logic  cjne_exec,
  output byte_t cjne_op1,
  output byte_t cjne_op2,
  input  logic  cjne_jump,
  // result of an attempt
  output logic  granted,
  output logic  denied,
  output logic  receiving
);
  if (BUF_DEPTH < PW_LEN) begin : g_depth_check
    $error("password_checker: BUF_DEPTH must hold at least PW_LEN bytes");
  end

  localparam int unsigned IW = $clog2(BUF_DEPTH);

  typedef enum logic [3:0] {
    S_MSG, S_MSG_WAIT, S_RECV, S_RXCMP, S_RXCNT,
    S_MATCH_LEN, S_MATCH_CHR, S_RESULT
  } state_e;

  state_e     state;
  msg_e       msg;
  logic [4:0] msg_idx;
  byte_t      rbyte;
  byte_t      ent_len;     // bytes in the entry, saturating at 255
  byte_t      r0;          // fixed-length down counter
  logic [IW-1:0] mi;       // match index
  logic       pass;
  byte_t      mem [BUF_DEPTH];

  function automatic byte_t pw_byte(logic [IW-1:0] i);
    return PASSWORD[8*(PW_LEN-1-int'(i)) +: 8];
  endfunction

  // Operands of the compare issued in each state.
  always_comb begin
    cjne_exec = 1'b0;
    cjne_op1  = '0;
    cjne_op2  = '0;
    case (state)
      S_RXCMP: if (RX_MODE == RX_VARIABLE) begin
        cjne_exec = 1'b1;  cjne_op1 = rbyte;  cjne_op2 = CH_ENTER;
      end
      S_RXCNT: begin
        cjne_exec = 1'b1;  cjne_op1 = r0;  cjne_op2 = 8'h00;
      end
      S_MATCH_LEN: begin
        cjne_exec = 1'b1;  cjne_op1 = ent_len;  cjne_op2 = 8'(PW_LEN);
      end
      S_MATCH_CHR: begin
        cjne_exec = 1'b1;  cjne_op1 = mem[mi];  cjne_op2 = pw_byte(mi);
      end
      default: ;
    endcase
  end

  assign tx_data   = msg_char(msg, 32'(msg_idx));
  assign receiving = (state == S_RECV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_MSG;
      msg      <= MSG_PROMPT;
      msg_idx  <= '0;
      rbyte    <= '0;
      ent_len  <= '0;
      r0       <= 8'(PW_LEN);
      mi       <= '0;
      pass     <= 1'b0;
      tx_start <= 1'b0;
      granted  <= 1'b0;
      denied   <= 1'b0;
    end else begin
      tx_start <= 1'b0;
      granted  <= 1'b0;
      denied   <= 1'b0;
      case (state)
        S_MSG: begin
          tx_start <= 1'b1;
          state    <= S_MSG_WAIT;
        end
        S_MSG_WAIT: if (tx_done) begin
          if (32'(msg_idx) == msg_len(msg) - 1) begin
            msg_idx <= '0;
            if (msg == MSG_PROMPT) begin
              state   <= S_RECV;
              ent_len <= '0;
              r0      <= 8'(PW_LEN);
            end else begin
              msg   <= MSG_PROMPT;
              state <= S_MSG;
            end
          end else begin
            msg_idx <= msg_idx + 1'b1;
            state   <= S_MSG;
          end
        end
        S_RECV: if (rx_valid) begin
          rbyte <= rx_data;
          state <= S_RXCMP;
        end
        S_RXCMP: begin
          if (RX_MODE == RX_VARIABLE && !cjne_jump) begin
            // Enter: the entry is complete
            mi    <= '0;
            state <= S_MATCH_LEN;
          end else begin
            if (32'(ent_len) < BUF_DEPTH) mem[IW'(ent_len)] <= rbyte;
            if (ent_len != 8'hFF) ent_len <= ent_len + 1'b1;
            if (RX_MODE == RX_FIXED) begin
              r0    <= r0 - 1'b1;
              state <= S_RXCNT;
            end else if (RX_MODE == RX_UNROLLED && 32'(ent_len) == PW_LEN - 1) begin
              mi    <= '0;
              state <= S_MATCH_LEN;
            end else begin
              state <= S_RECV;
            end
          end
        end
        S_RXCNT: begin
          if (!cjne_jump) begin
            mi    <= '0;
            state <= S_MATCH_LEN;
          end else begin
            state <= S_RECV;
          end
        end
        S_MATCH_LEN: begin
          pass  <= !cjne_jump;
          state <= cjne_jump ? S_RESULT : S_MATCH_CHR;
        end
        S_MATCH_CHR: begin
          if (cjne_jump) begin
            pass  <= 1'b0;
            state <= S_RESULT;
          end else if (32'(mi) == PW_LEN - 1) begin
            state <= S_RESULT;
          end else begin
            mi <= mi + 1'b1;
          end
        end
        S_RESULT: begin
          granted <= pass;
          denied  <= !pass;
          msg     <= pass ? MSG_GRANTED : MSG_DENIED;
          msg_idx <= '0;
          state   <= S_MSG;
        end
        default: state <= S_MSG;
      endcase
    end
  end
endmodule
