// Modified Brent-Kung parallel prefix adder: the nucleus stage of the hybrid
// variable latency carry skip adder.
//
// Preprocessing forms p_i = a_i ^ b_i and g_i = a_i & b_i. A Brent-Kung prefix
// network then computes the group terms (G_i:1, P_i:1) of every bit position
// inside the slice, as if the slice's carry input were zero, so the network
// works in parallel with the stages below it. An added level merges the real
// carry input into every prefix, c_i+1 = G_i:1 | P_i:1 & cin, and
// postprocessing forms s_i = p_i ^ c_i (bit 1 takes cin directly). G_M:1 and
// P_M:1 go to the stage's skip logic, and P_M:1 also drives the one-cycle /
// two-cycle prediction.
//
// Prefix network (for M = 8, positions numbered from 1): an up-sweep forms
// 2:1, 4:3, 6:5, 8:7, then 4:1, 8:5, then 8:1; a down-sweep forms 6:1, then
// 3:1, 5:1, 7:1. The general rule for a power-of-two M is used. The structure
// (pre/network/added level/post) follows the adder's description; the
// loop formulation is this design's.
//
// Interface: a, b, cin (true polarity) -> s, g_grp, p_grp. Combinational.
module bk_ppa #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] s,
  output logic         g_grp,
  output logic         p_grp
);
  localparam int unsigned LEVELS = $clog2(M);

  if ((1 << LEVELS) != M) begin : g_bad_m
    $error("bk_ppa: M must be a power of two");
  end

  logic [M-1:0] p, g;        // preprocessing
  logic [M-1:0] gp, pp;      // prefix terms G_i:1 / P_i:1 (0-based index i)
  logic [M:0]   c;           // carry into bit i

  assign p = a ^ b;
  assign g = a & b;

  // Brent-Kung network; index i covers bits i..0 once the sweeps are done
  always_comb begin
    gp = g;
    pp = p;
    // up-sweep: node i (i+1 a multiple of 2^(d+1)) absorbs node i - 2^d
    for (int d = 0; d < LEVELS; d++) begin
      for (int i = 0; i < M; i++) begin
        if (((i + 1) % (2 << d)) == 0) begin
          gp[i] = gp[i] | (pp[i] & gp[i - (1 << d)]);
          pp[i] = pp[i] & pp[i - (1 << d)];
        end
      end
    end
    // down-sweep: node i (i+1 = k*2^(d+1) + 2^d, k >= 1) absorbs node i - 2^d
    for (int d = LEVELS - 2; d >= 0; d--) begin
      for (int i = 0; i < M; i++) begin
        if ((i + 1) > (2 << d) && ((i + 1) % (2 << d)) == (1 << d)) begin
          gp[i] = gp[i] | (pp[i] & gp[i - (1 << d)]);
          pp[i] = pp[i] & pp[i - (1 << d)];
        end
      end
    end
  end

  // added level: merge the stage carry input into every prefix
  assign c[0] = cin;
  for (genvar i = 0; i < M; i++) begin : g_added
    assign c[i+1] = gp[i] | (pp[i] & cin);
  end

  // postprocessing
  assign s     = p ^ c[M-1:0];
  assign g_grp = gp[M-1];
  assign p_grp = pp[M-1];

  logic unused_carry;
  assign unused_carry = c[M];
endmodule
