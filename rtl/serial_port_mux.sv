// serial_port_mux: shares the board's UART pins between the 8051 serial
// port and the board's other UART user.
//
// With the switches SW[2:1] at "10" the board's receive pin feeds the 8051
// serial port and the 8051's transmit line drives the board's transmit pin,
// so a PC on the UART talks to the password program. In every other switch
// setting the pins belong to the other UART module, and the 8051 sees an
// idle (high) receive line. Purely combinational. The select code "10"
// follows the attack description; what the other UART user is, and that
// the unselected side sees an idle line, are this design's choice.
module serial_port_mux (
  input  logic [2:1] sw,
  // board UART pins
  input  logic       board_rxd,
  output logic       board_txd,
  // 8051 serial port
  output logic       mcu_rxd,
  input  logic       mcu_txd,
  // the other UART user of the board
  output logic       alt_rxd,
  input  logic       alt_txd
);
  logic mcu_sel;
  assign mcu_sel = (sw == 2'b10);

  always_comb begin
    if (mcu_sel) begin
      mcu_rxd   = board_rxd;
      board_txd = mcu_txd;
      alt_rxd   = 1'b1;
    end else begin
      mcu_rxd   = 1'b1;
      board_txd = alt_txd;
      alt_rxd   = board_rxd;
    end
  end
endmodule
