// Self-checking test of ci_rca in both forms: with a carry input (stage 1) and
// with carry-in zero (half adder in the lowest cell). Random and corner
// operands; sum, carry out and bit propagates are compared with a + b + cin
// and a ^ b worked out in the testbench.
module ci_rca_tb;
  localparam int unsigned M = 16;
  int checks = 0, failures = 0;

  logic [M-1:0] a, b, z1, z0, p1, p0;
  logic         cin, c1, c0;

  ci_rca #(.M(M), .HAS_CIN(1'b1)) dut_cin   (.a(a), .b(b), .cin(cin), .z(z1), .cout(c1), .p(p1));
  ci_rca #(.M(M), .HAS_CIN(1'b0)) dut_nocin (.a(a), .b(b), .cin(cin), .z(z0), .cout(c0), .p(p0));

  task automatic check(input logic [M-1:0] ta, tb_, input logic tc);
    logic [M:0] e1, e0;
    a = ta; b = tb_; cin = tc;
    #1;
    e1 = {1'b0, ta} + {1'b0, tb_} + (M+1)'(tc);
    e0 = {1'b0, ta} + {1'b0, tb_};
    checks += 3;
    if ({c1, z1} !== e1) begin failures++; $display("FAIL cin form a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {c1, z1}, e1); end
    if ({c0, z0} !== e0) begin failures++; $display("FAIL nocin form a=%h b=%h got %h exp %h", ta, tb_, {c0, z0}, e0); end
    if (p1 !== (ta ^ tb_) || p0 !== (ta ^ tb_)) begin failures++; $display("FAIL propagate a=%h b=%h", ta, tb_); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '0, 1'b1);
    check('1, '1, 1'b1);
    check(16'h00ff, 16'h0100, 1'b0);
    check(16'h00ff, 16'h0001, 1'b0);
    check(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 2000; i++) check(M'($urandom), M'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
