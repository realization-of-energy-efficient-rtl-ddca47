// End-to-end test of cska64_top at its default sizes.
//
// The combinational CI-CSKA and the clocked hybrid variable latency adder are
// driven with the same operand stream: first the operand pairs of the
// reference waveforms (0xFF + 0x100 with carry-in 0 then 1, 0x64 + 0x96 + 1,
// 100 + 200 + 1), then random operands shaped so that whole stages propagate.
// Every sum is compared with a 65-bit sum worked out here; the hybrid adder's
// latency (1 or 2 cycles) is checked against the nucleus-propagate prediction.
// Each mechanism must occur at least once, or a failure is counted:
//   - a carry skipping over a whole CI-CSKA stage (stage propagate and carry in)
//   - a carry out of the 64-bit adder
//   - a one-cycle and a two-cycle hybrid operation, a carry crossing the
//     nucleus by its skip gate, a stalled offer, and back-to-back operations.
module cska64_top_tb;
  int checks = 0, failures = 0;
  int n_skip = 0, n_cout = 0, n_one = 0, n_two = 0, n_nucleus_skip = 0;
  int n_stall = 0, n_b2b = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] ci_a = '0, ci_b = '0, ci_s;
  logic        ci_cin = 1'b0, ci_cout;
  logic        hvl_in_valid = 1'b0, hvl_in_ready, hvl_out_valid, hvl_cout, hvl_out_two_cycle;
  logic [63:0] hvl_a = '0, hvl_b = '0, hvl_s;
  logic        hvl_cin = 1'b0;

  cska64_top dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [64:0] sum;
    logic        pred;
    int          edge_no;
  } expect_t;

  expect_t queue_q[$];
  int      edge_no = 0;
  logic    last_capture_cycle_loaded = 1'b0;

  localparam int NUM_OPS = 4000;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand i of the stream
  function automatic logic [128:0] operands(int i);
    logic [63:0] a, b;
    logic        c;
    case (i)
      0: return {64'hff, 64'h100, 1'b0};
      1: return {64'hff, 64'h100, 1'b1};
      2: return {64'h64, 64'h96, 1'b1};
      3: return {64'd100, 64'd200, 1'b1};
      4: return {64'hffff_ffff_ffff_ffff, 64'h0, 1'b1};
      default: begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
        c = 1'($urandom);
        // make random 16-bit stages and the nucleus (bits 28..35) propagate
        for (int k = 0; k < 4; k++) if ($urandom % 3 == 0) b[16*k +: 16] = ~a[16*k +: 16];
        if ($urandom % 2) b[35:28] = ~a[35:28];
        if ($urandom % 3 == 0) b[27:0] = ~a[27:0];
        return {a, b, c};
      end
    endcase
  endfunction

  initial begin
    int sent = 0;
    logic will_load;
    logic [64:0] e_ci;
      repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (sent < NUM_OPS || queue_q.size() != 0) begin
      logic [128:0] op;
      @(negedge clk);
      op = operands(sent);
      {hvl_a, hvl_b, hvl_cin} = op;
      {ci_a, ci_b, ci_cin}    = op;
      hvl_in_valid = (sent < NUM_OPS) && ((sent < 5) || ($urandom % 6 != 0));
      #1;
      // combinational CI-CSKA
      e_ci = {1'b0, ci_a} + {1'b0, ci_b} + 65'(ci_cin);
      checks++;
      if ({ci_cout, ci_s} !== e_ci) begin
        failures++; $display("FAIL CI-CSKA a=%h b=%h cin=%b got %h exp %h", ci_a, ci_b, ci_cin, {ci_cout, ci_s}, e_ci);
      end
      if (e_ci[64]) n_cout++;
      for (int k = 1; k < 4; k++) begin
        // carry into stage k+1 is 1 and the whole stage propagates
        logic [63:0] mask;
        logic [64:0] low;
        mask = (64'd1 << (16 * k)) - 1;
        low  = {1'b0, ci_a & mask} + {1'b0, ci_b & mask} + 65'(ci_cin);
        if (low[16 * k] && &((ci_a ^ ci_b) >> (16 * k) | ~(64'hffff))) n_skip++;
      end
      // hybrid adder
      will_load = hvl_in_valid && hvl_in_ready;
      if (hvl_in_valid && !hvl_in_ready) n_stall++;
      if (hvl_out_valid) begin
        expect_t e;
        checks += 3;
        if (queue_q.size() == 0) begin
          failures++; $display("FAIL hybrid result with nothing outstanding");
        end else begin
          e = queue_q.pop_front();
          if ({hvl_cout, hvl_s} !== e.sum) begin failures++; $display("FAIL hybrid got %h exp %h", {hvl_cout, hvl_s}, e.sum); end
          if (hvl_out_two_cycle !== e.pred) begin failures++; $display("FAIL hybrid two-cycle flag"); end
          if (edge_no != e.edge_no + 1 + int'(e.pred)) begin
            failures++; $display("FAIL hybrid latency %0d, pred %b", edge_no - e.edge_no, e.pred);
          end
          if (e.pred) n_two++; else n_one++;
          if (will_load) n_b2b++;
        end
      end
      @(posedge clk);
      edge_no++;
      if (will_load) begin
        expect_t n;
        n.sum     = {1'b0, hvl_a} + {1'b0, hvl_b} + 65'(hvl_cin);
        n.pred    = &(hvl_a[35:28] ^ hvl_b[35:28]);
        n.edge_no = edge_no;
        if (n.pred && ((({1'b0, hvl_a[27:0]} + {1'b0, hvl_b[27:0]} + 29'(hvl_cin)) >> 28) != 0)) n_nucleus_skip++;
        queue_q.push_back(n);
        sent++;
      end
    end
    $display("stage skips %0d, carry outs %0d, one-cycle %0d, two-cycle %0d, nucleus skips %0d, stalls %0d, back-to-back %0d",
             n_skip, n_cout, n_one, n_two, n_nucleus_skip, n_stall, n_b2b);
    checks += 7;
    if (n_skip == 0)         begin failures++; $display("FAIL no stage skip"); end
    if (n_cout == 0)         begin failures++; $display("FAIL no carry out"); end
    if (n_one == 0)          begin failures++; $display("FAIL no one-cycle operation"); end
    if (n_two == 0)          begin failures++; $display("FAIL no two-cycle operation"); end
    if (n_nucleus_skip == 0) begin failures++; $display("FAIL no carry across the nucleus"); end
    if (n_stall == 0)        begin failures++; $display("FAIL no stall"); end
    if (n_b2b == 0)          begin failures++; $display("FAIL no back-to-back operation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
