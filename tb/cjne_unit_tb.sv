// cjne_unit_tb: checks the CJNE compare flags against a reference written
// from the 8051 definition (jump when the bytes differ, carry when the first
// is below the second, unsigned), over a full sweep of one operand against
// a set of the other, and checks that while `armed` the unit reports
// "equal" with carry clear for every operand pair.
module cjne_unit_tb;
  import ht8051_pkg::*;

  byte_t op1, op2;
  logic  armed, jump, carry, equal_true;
  int    checks = 0, failures = 0;

  cjne_unit dut (.op1, .op2, .armed, .jump, .carry, .equal_true);

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op1=%02h op2=%02h armed=%0b got=%0b exp=%0b", what, op1, op2, armed, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t others [8] = '{8'h00, 8'h01, 8'h0D, 8'h23, 8'h2A, 8'h4D, 8'h7F, 8'hFF};
    for (int a = 0; a < 256; a++) begin
      foreach (others[k]) begin
        op1 = byte_t'(a);
        op2 = others[k];
        armed = 1'b0;
        #1;
        check("jump",  jump,  a != int'(others[k]));
        check("carry", carry, a <  int'(others[k]));
        check("eq",    equal_true, a == int'(others[k]));
        armed = 1'b1;
        #1;
        check("armed jump",  jump,  1'b0);
        check("armed carry", carry, 1'b0);
        check("armed eq",    equal_true, a == int'(others[k]));
      end
    end
    // the password bytes of "MAGIC" against a wrong guess
    op1 = "M"; op2 = "X"; armed = 0; #1;
    check("M vs X", jump, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
