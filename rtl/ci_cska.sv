// Concatenation and incrementation carry skip adder (CI-CSKA), 64 bits.
//
// Idea: in a classic carry skip adder every block waits for its carry input
// before its ripple chain can settle, and a multiplexer selects the skipped
// carry. Here every block except the first adds its slice with carry-in zero,
// in parallel with all the others (concatenation). The real carry then travels
// only through one compound gate per stage (AOI and OAI alternately), and each
// stage adds it to its precomputed result with a half-adder chain
// (incrementation). The critical path is the first ripple block, the skip
// gates of the middle stages, and the last incrementation block.
//
// Stage 1 (STAGE_SIZE[0] bits) is a ripple block with the real carry input.
// Stages 2..NUM_STAGES are ci_cska_stage instances. Stage 2 receives a true
// carry and uses an AOI gate; the polarity then alternates. If the last stage
// gives an inverted carry it is complemented for cout.
//
// The default is the fixed-stage-size form, 4 stages of 16 bits, which is the
// configuration the adder's description draws. Any list of stage sizes that
// sums to WIDTH may be given (variable stage size); that flexibility, and the
// complemented final carry, are this design's choices.
//
// Interface: a, b, cin -> s, cout. Combinational.
module ci_cska #(
  parameter int unsigned          WIDTH      = 64,
  parameter cska_pkg::stage_sizes_t STAGE_SIZE = '{0: 16, 1: 16, 2: 16, 3: 16, default: 0}
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NUM_STAGES = cska_pkg::num_stages(STAGE_SIZE);

  // LSB position of stage k
  function automatic int unsigned lsb_of(int unsigned k);
    return cska_pkg::stage_lsb(STAGE_SIZE, k);
  endfunction

  if (lsb_of(NUM_STAGES) != WIDTH) begin : g_bad_sizes
    $error("ci_cska: STAGE_SIZE must sum to WIDTH");
  end

  // carry out of each stage, in the polarity that stage produces
  logic [NUM_STAGES-1:0] co;

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

  for (genvar k = 1; k < NUM_STAGES; k++) begin : g_stage
    localparam int unsigned LSB = lsb_of(k);
    localparam int unsigned MK  = STAGE_SIZE[k];
    // stage 2 (k = 1) gets a true carry; polarity alternates from there
    localparam bit INV_IN = ((k - 1) % 2) == 1;

    ci_cska_stage #(.M(MK), .INV_IN(INV_IN)) u_stage (
      .a   (a[LSB +: MK]),
      .b   (b[LSB +: MK]),
      .cin (co[k-1]),
      .s   (s[LSB +: MK]),
      .cout(co[k])
    );
  end

  // stage k (k >= 1) gives an inverted carry when k is odd
  localparam bit LAST_INV = (NUM_STAGES > 1) && (((NUM_STAGES - 1) % 2) == 1);
  assign cout = LAST_INV ? ~co[NUM_STAGES-1] : co[NUM_STAGES-1];
endmodule
