// uart_tx: transmit half of the micro-controller's serial port.
//
// Sends `data` as one 8N1 frame (start bit, eight data bits LSB first, stop
// bit), each bit held for CLKS_PER_BIT clocks. A one-clock `start` pulse
// while `busy` is low loads the byte, as a write to SBUF does on the 8051;
// `busy` stays high until the stop bit has been held for its full time and
// `done` then pulses for one clock (the 8051's TI). A `start` while busy is
// ignored. The serial port is named by the attack description; the frame
// format and the 50 MHz / 9600 baud default are this design's choice.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy,
  output logic       done
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame;   // stop, data[7:0], start; shifted out LSB first
  logic [3:0]    bits_left;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd       <= 1'b1;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        txd <= 1'b1;
        if (start) begin
          frame     <= {1'b1, data, 1'b0};
          txd       <= 1'b0;
          busy      <= 1'b1;
          bits_left <= 4'd9;
          cnt       <= CW'(CLKS_PER_BIT - 1);
        end
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else if (bits_left != 0) begin
        frame     <= {1'b1, frame[9:1]};
        txd       <= frame[1];
        bits_left <= bits_left - 1'b1;
        cnt       <= CW'(CLKS_PER_BIT - 1);
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        txd  <= 1'b1;
      end
    end
  end
endmodule
