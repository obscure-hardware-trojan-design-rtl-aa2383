// serial_port_mux_tb: drives every switch setting with every combination of
// the two incoming lines and checks where each line arrives: with SW[2:1] =
// "10" the board pins belong to the micro-controller and the other user
// sees an idle line; otherwise the reverse.
module serial_port_mux_tb;
  logic [2:1] sw;
  logic board_rxd, board_txd, mcu_rxd, mcu_txd, alt_rxd, alt_txd;
  int checks = 0, failures = 0;

  serial_port_mux dut (.*);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sw=%b got=%0b exp=%0b", what, sw, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 8; v++) begin
        sw = 2'(s);
        {board_rxd, mcu_txd, alt_txd} = 3'(v);
        #1;
        if (s == 2) begin
          check("mcu_rxd",   mcu_rxd,   board_rxd);
          check("board_txd", board_txd, mcu_txd);
          check("alt_rxd",   alt_rxd,   1'b1);
        end else begin
          check("mcu_rxd",   mcu_rxd,   1'b1);
          check("board_txd", board_txd, alt_txd);
          check("alt_rxd",   alt_rxd,   board_rxd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
