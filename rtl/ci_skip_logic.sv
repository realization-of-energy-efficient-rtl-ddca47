// Carry skip logic of one stage, as a single compound gate.
//
// It forms the stage carry out C_O,j = G_j | (P_j & C_O,j-1), where G_j is the
// carry out of the stage's carry-zero ripple block and P_j is the AND of the
// stage's bit propagates. Instead of a 2:1 multiplexer the adder uses
// alternating compound gates, which invert the carry in every stage:
//   AOI (OAI = 0): inputs in true polarity,  cout = ~(g | (p_grp & cin))   = C-bar
//   OAI (OAI = 1): g and cin come inverted,  cout = ~(g & (~p_grp | cin))  = C
// so an AOI stage hands an inverted carry to an OAI stage and back again.
// The AOI/OAI choice and the polarities follow the adder's description; the
// complement of p_grp inside the OAI form is this design's reading of it.
//
// Interface: g, p_grp, cin -> cout. Combinational.
module ci_skip_logic #(
  parameter bit OAI = 1'b0
) (
  input  logic g,
  input  logic p_grp,
  input  logic cin,
  output logic cout
);
  if (OAI) begin : g_oai
    assign cout = ~(g & (~p_grp | cin));
  end else begin : g_aoi
    assign cout = ~(g | (p_grp & cin));
  end
endmodule
