// alu: the Simple-12 arithmetic/logic unit.
//
// The b operand is optionally inverted (b-invert) and then combined with a
// as AND, OR or ADD; the ADD also adds the carry-in bit. With b-invert and
// carry-in both set, ADD gives a - b in two's complement, which is how the
// machine subtracts. The same unit passes a value through (a = 0, ADD with
// b selected) and increments (carry-in with a = 0, b = PC). The zero output
// is the "ALU = 0" test the sequencer uses for JZ. Purely combinational.
//
// The four control bits, their order {b-invert, carry-in, op1, op0} and the
// codes 00 AND, 01 OR, 10 ADD follow the Simple-12 definition. Op code 11 is
// not assigned there; this design returns zero for it. Carry-out and
// overflow are not produced, as no instruction uses them.
module alu
  import simple12_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_ctl_t     ctl,
  output logic [W-1:0] y,
  output logic         zero
);

  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = ctl.b_invert ? ~b : b;
    unique case (ctl.op)
      ALU_AND: y = a & b_eff;
      ALU_OR:  y = a | b_eff;
      ALU_ADD: y = a + b_eff + W'(ctl.carry_in);
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
