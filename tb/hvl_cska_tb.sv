// Self-checking test of the combinational hybrid variable latency adder at its
// default sizes (stages 4, 10, 14, nucleus 8 at bits 28..35, 14, 10, 4). Sum and
// carry are compared with a 65-bit sum; the prediction must be 1 exactly when
// all eight nucleus bits propagate. Vectors force the nucleus to propagate
// often, with carries arriving from below, so the long path is taken.
module hvl_cska_tb;
  int checks = 0, failures = 0, long_paths = 0, short_paths = 0;

  logic [63:0] a, b, s;
  logic        cin, cout, two_cycle;

  hvl_cska dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .two_cycle(two_cycle));

  task automatic check(input logic [63:0] ta, tb_, input logic tc);
    logic [64:0] e;
    logic        pred;
    a = ta; b = tb_; cin = tc;
    #1;
    e    = {1'b0, ta} + {1'b0, tb_} + 65'(tc);
    pred = &(ta[35:28] ^ tb_[35:28]);
    if (pred) long_paths++; else short_paths++;
    checks += 2;
    if ({cout, s} !== e) begin failures++; $display("FAIL a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {cout, s}, e); end
    if (two_cycle !== pred) begin failures++; $display("FAIL prediction a=%h b=%h got %b", ta, tb_, two_cycle); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'hff, 64'h100, 1'b0);
    check(64'hff, 64'h100, 1'b1);
    check(64'd100, 64'd200, 1'b1);
    check('1, 64'h0, 1'b1);
    check('1, '1, 1'b0);
    for (int k = 0; k < 64; k++) begin
      check(~(64'd1 << k), 64'd1 << k, 1'b1);
      check(64'd1 << k, (64'd1 << k) | ~((64'd2 << k) - 1), 1'b0);
    end
    for (int i = 0; i < 6000; i++) begin
      logic [63:0] ra, rb;
      ra = {$urandom, $urandom};
      rb = {$urandom, $urandom};
      if (i % 2 == 0) rb[35:28] = ~ra[35:28];           // nucleus propagates
      if (i % 4 == 0) rb[27:0]  = ~ra[27:0] ^ 28'(1 << (i % 28));
      check(ra, rb, 1'($urandom));
    end
    checks++;
    if (long_paths == 0 || short_paths == 0) begin failures++; $display("FAIL a prediction outcome never occurred"); end
    $display("long-path operations %0d, short-path operations %0d", long_paths, short_paths);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
