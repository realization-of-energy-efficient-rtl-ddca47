// One concatenation/incrementation stage (stages 2..Q of the carry skip adder).
//
// The slice is first added with carry-in zero by a ripple block (half adder +
// full adders), giving the intermediate result Z and the block generate G. The
// AND of the bit propagates gives the block propagate P. The skip logic makes
// the stage carry out from G, P and the incoming carry, and the incrementation
// block adds the incoming carry to Z. The critical path through a stage is
// therefore one compound gate, not the ripple chain.
//
// Polarity: INV_IN = 0 means cin arrives true and the stage uses an AOI gate,
// giving an inverted cout. INV_IN = 1 means cin arrives inverted, the ripple
// carry is taken inverted, the stage uses an OAI gate and gives a true cout.
// The incrementation block always needs the true carry, so an inverted cin is
// complemented on its way there. Structure and polarities follow the adder's
// description; parameterising the polarity is this design's choice.
//
// Interface: a, b, cin -> s, cout. Combinational.
module ci_cska_stage #(
  parameter int unsigned M      = 16,
  parameter bit          INV_IN = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         cout
);
  logic [M-1:0] z, p;
  logic         g;
  logic         p_grp;
  logic         cin_true;

  ci_rca #(.M(M), .HAS_CIN(1'b0)) u_rca (
    .a(a), .b(b), .cin(1'b0), .z(z), .cout(g), .p(p)
  );

  assign p_grp    = &p;
  assign cin_true = INV_IN ? ~cin : cin;

  ci_skip_logic #(.OAI(INV_IN)) u_skip (
    .g    (INV_IN ? ~g : g),
    .p_grp(p_grp),
    .cin  (cin),
    .cout (cout)
  );

  ci_incrementer #(.M(M)) u_inc (
    .z(z), .cin(cin_true), .s(s)
  );
endmodule
