// Hybrid variable latency concatenation/incrementation carry skip adder, 64 bits.
//
// The adder is the CI-CSKA (see ci_cska) with one middle stage, the nucleus,
// replaced by a modified Brent-Kung parallel prefix adder (bk_ppa) and its own
// AOI/OAI skip gate. The longest carry paths run from stage 1 through the
// skip gates, across the nucleus skip gate and on to the upper stages. Such a
// path is only sensitised when the whole nucleus propagates (P_Mp:1 = 1): if
// it does not, the carry into the upper stages is fixed by the nucleus'
// generate, which the prefix network makes quickly. The output two_cycle is
// that propagate, the one-cycle / two-cycle prediction: operations with
// two_cycle = 0 only use short paths and fit in one (short) clock period.
//
// Stage k = 0 is a ripple block with the carry input; stage NUCLEUS is the
// prefix adder; all others are ci_cska_stage. Carry polarity alternates as in
// ci_cska (stage k gives an inverted carry when k is odd); the nucleus follows
// the same rule, and with the default sizes it gets a true carry and uses AOI.
//
// The prefix nucleus, its 8-bit size and the use of its propagate for the
// prediction follow the adder's description, as does building the hybrid on a
// variable-stage-size adder whose first and last stages are small. The exact
// sizes (4, 10, 14 below the nucleus at bits 28..35, then 14, 10, 4) are this
// design's choice: the description does not give them.
//
// Interface: a, b, cin -> s, cout, two_cycle. Combinational.
module hvl_cska #(
  parameter int unsigned          WIDTH      = 64,
  parameter cska_pkg::stage_sizes_t STAGE_SIZE = '{0: 4, 1: 10, 2: 14, 3: 8, 4: 14, 5: 10, 6: 4, default: 0},
  parameter int unsigned          NUCLEUS    = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             two_cycle
);
  localparam int unsigned NUM_STAGES = cska_pkg::num_stages(STAGE_SIZE);

  // LSB position of stage k
  function automatic int unsigned lsb_of(int unsigned k);
    return cska_pkg::stage_lsb(STAGE_SIZE, k);
  endfunction

  if (lsb_of(NUM_STAGES) != WIDTH) begin : g_bad_sizes
    $error("hvl_cska: STAGE_SIZE must sum to WIDTH");
  end
  if (NUCLEUS < 1 || NUCLEUS >= NUM_STAGES) begin : g_bad_nucleus
    $error("hvl_cska: the nucleus must be a stage above stage 1");
  end

  logic [NUM_STAGES-1:0] co;   // stage carry outs, in each stage's polarity

  localparam int unsigned M0 = STAGE_SIZE[0];
  logic [M0-1:0] p_stage1;

  ci_rca #(.M(M0), .HAS_CIN(1'b1)) u_stage1 (
    .a   (a[M0-1:0]),
    .b   (b[M0-1:0]),
    .cin (cin),
    .z   (s[M0-1:0]),
    .cout(co[0]),
    .p   (p_stage1)
  );

  // stage 1 has no skip logic, so its bit propagates are not needed
  logic unused_p;
  assign unused_p = ^p_stage1;

  logic nucleus_p;

  for (genvar k = 1; k < NUM_STAGES; k++) begin : g_stage
    localparam int unsigned LSB    = lsb_of(k);
    localparam int unsigned MK     = STAGE_SIZE[k];
    localparam bit          INV_IN = ((k - 1) % 2) == 1;

    if (k == NUCLEUS) begin : g_nucleus
      logic g_grp, p_grp;

      bk_ppa #(.M(MK)) u_ppa (
        .a    (a[LSB +: MK]),
        .b    (b[LSB +: MK]),
        .cin  (INV_IN ? ~co[k-1] : co[k-1]),
        .s    (s[LSB +: MK]),
        .g_grp(g_grp),
        .p_grp(p_grp)
      );

      ci_skip_logic #(.OAI(INV_IN)) u_skip (
        .g    (INV_IN ? ~g_grp : g_grp),
        .p_grp(p_grp),
        .cin  (co[k-1]),
        .cout (co[k])
      );

      assign nucleus_p = p_grp;
    end else begin : g_ci
      ci_cska_stage #(.M(MK), .INV_IN(INV_IN)) u_stage (
        .a   (a[LSB +: MK]),
        .b   (b[LSB +: MK]),
        .cin (co[k-1]),
        .s   (s[LSB +: MK]),
        .cout(co[k])
      );
    end
  end

  localparam bit LAST_INV = ((NUM_STAGES - 1) % 2) == 1;
  assign cout      = LAST_INV ? ~co[NUM_STAGES-1] : co[NUM_STAGES-1];
  assign two_cycle = nucleus_p;
endmodule
