// M-bit ripple carry block of the concatenation/incrementation carry skip adder.
//
// Stage 1 of the adder owns the real carry input, so it is built from M full
// adders (HAS_CIN = 1). Every other stage adds its slice with a carry input of
// zero, which lets its lowest cell be a half adder followed by M-1 full adders
// (HAS_CIN = 0, cin is then ignored). That is what allows all stages to add in
// parallel ("concatenation"): the incoming carry is applied afterwards by the
// incrementation block. The cell mix follows the adder's description; bringing
// out the per-bit propagate vector p for the skip logic is this design's way
// of feeding the block-propagate AND.
//
// Interface: a, b, cin -> z (M-bit sum), cout (carry out; with HAS_CIN = 0 it
// is the block generate), p (a ^ b per bit). Combinational.
module ci_rca #(
  parameter int unsigned M       = 16,
  parameter bit          HAS_CIN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] z,
  output logic         cout,
  output logic [M-1:0] p
);
  logic [M:0] c;

  if (HAS_CIN) begin : g_cin
    assign c[0] = cin;
    full_adder u_fa0 (.a(a[0]), .b(b[0]), .ci(c[0]), .s(z[0]), .co(c[1]), .p(p[0]));
  end else begin : g_nocin
    // carry input is zero: the lowest cell is a half adder
    assign c[0] = 1'b0;
    half_adder u_ha0 (.a(a[0]), .b(b[0]), .s(z[0]), .c(c[1]));
    assign p[0] = z[0];
    logic unused_cin;
    assign unused_cin = cin;   // no carry input in this form
  end

  for (genvar i = 1; i < M; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(z[i]), .co(c[i+1]), .p(p[i]));
  end

  assign cout = c[M];
endmodule
