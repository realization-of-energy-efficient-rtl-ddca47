// Incrementation block of a concatenation/incrementation stage.
//
// The stage's ripple block has produced Z = A + B of its slice with carry-in
// zero. This block adds the stage's real carry input to Z with a chain of M
// half adders: s = Z + cin (mod 2^M). The carry out of the last half adder is
// dropped, because the stage carry out comes from the skip logic instead; the
// structure follows the adder's description.
//
// Interface: z, cin (true polarity) -> s. Combinational.
module ci_incrementer #(
  parameter int unsigned M = 16
) (
  input  logic [M-1:0] z,
  input  logic         cin,
  output logic [M-1:0] s
);
  logic [M:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_ha
    half_adder u_ha (.a(z[i]), .b(c[i]), .s(s[i]), .c(c[i+1]));
  end

  // c[M] is the carry of the last half adder; it is intentionally unused.
  logic unused_carry;
  assign unused_carry = c[M];
endmodule
