// Self-checking test of the clocked hybrid variable latency adder at its
// default width. A random stream of operations (with random gaps, and half of
// them making the nucleus propagate) is offered through the valid/ready
// handshake. Each result is compared, in order, with a 65-bit sum worked out
// in the testbench, and its latency is checked: out_valid must follow the
// loading edge by 1 edge for a one-cycle operation and by 2 for a two-cycle
// one, as the nucleus propagate predicts.
module hvl_cska_unit_tb;
  int checks = 0, failures = 0, ones = 0, twos = 0, stalls = 0;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid = 1'b0, in_ready, out_valid, cout, out_two_cycle;
  logic [63:0] a = '0, b = '0, s;
  logic        cin = 1'b0;

  hvl_cska_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [64:0] sum;
    logic        pred;
    int          edge_no;
  } expect_t;

  expect_t queue_q[$];
  int      edge_no = 0;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    logic will_load;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (sent < 3000 || queue_q.size() != 0) begin
      @(negedge clk);
      in_valid = (sent < 3000) && (($urandom % 5) != 0);
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      cin = 1'($urandom);
      if ($urandom % 2) b[35:28] = ~a[35:28];
      if ($urandom % 4 == 0) b[27:0] = ~a[27:0];
      #1;
      will_load = in_valid && in_ready;
      if (in_valid && !in_ready) stalls++;
      if (out_valid) begin
        expect_t e;
        checks += 3;
        if (queue_q.size() == 0) begin
          failures++; $display("FAIL result with no operation outstanding");
        end else begin
          e = queue_q.pop_front();
          if ({cout, s} !== e.sum) begin failures++; $display("FAIL sum got %h exp %h", {cout, s}, e.sum); end
          if (out_two_cycle !== e.pred) begin failures++; $display("FAIL two-cycle flag"); end
          if (edge_no != e.edge_no + 1 + int'(e.pred)) begin
            failures++; $display("FAIL latency %0d edges, pred %b", edge_no - e.edge_no, e.pred);
          end
          if (e.pred) twos++; else ones++;
        end
      end
      @(posedge clk);
      edge_no++;
      if (will_load) begin
        expect_t n;
        n.sum     = {1'b0, a} + {1'b0, b} + 65'(cin);
        n.pred    = &(a[35:28] ^ b[35:28]);
        n.edge_no = edge_no;
        queue_q.push_back(n);
        sent++;
      end
    end
    checks += 3;
    if (ones == 0)   begin failures++; $display("FAIL no one-cycle operation"); end
    if (twos == 0)   begin failures++; $display("FAIL no two-cycle operation"); end
    if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("one-cycle %0d, two-cycle %0d, stalled offers %0d", ones, twos, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
