// Half adder: the cell of the incrementation chain and the lowest cell of every
// carry-zero ripple block. s = a ^ b, c = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
