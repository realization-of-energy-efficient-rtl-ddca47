// Full adder: the cell of the ripple carry blocks. It also brings out the bit
// propagate p = a ^ b, which the carry skip logic of the stage ANDs together.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p
);
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
