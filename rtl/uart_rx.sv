// uart_rx: receive half of the micro-controller's serial port.
//
// Turns asynchronous 8N1 frames (one start bit, eight data bits LSB first,
// one stop bit) on `rxd` into bytes. The line is synchronised by two flops;
// a falling edge starts a frame, the start bit is re-checked at its middle,
// and each data bit is sampled CLKS_PER_BIT clocks after the previous one.
// `valid` pulses for one clock with `data` when a frame with a good stop bit
// ends, the moment the 8051 would set RI and load SBUF; a bad stop bit
// raises `frame_err` for one clock instead. The serial port is named by the
// attack description; frame format, bit timing and the 50 MHz / 9600 baud
// default (5208 clocks per bit) are this design's choice.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 5208
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  rx_state_e      state;
  logic [CW-1:0]  cnt;
  logic [2:0]     bit_idx;
  logic [7:0]     shreg;
  logic [1:0]     sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        R_IDLE: if (!line) begin
          state <= R_START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        R_START: if (cnt == 0) begin
          if (!line) begin
            state   <= R_DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= R_IDLE;  // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        R_DATA: if (cnt == 0) begin
          shreg <= {line, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= R_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        R_STOP: if (cnt == 0) begin
          state <= R_IDLE;
          if (line) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
