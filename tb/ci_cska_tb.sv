// Self-checking test of the 64-bit CI-CSKA: the default fixed-stage-size
// adder (4 x 16) and a variable-stage-size instance (1, 3, 5, ..., 15 bits).
// Vectors: the operand pairs of the reference waveforms (0xFF + 0x100 with
// carry-in 0 and 1, 0x64 + 0x96 + 1, 100 + 200 + 1), carry chains that run
// across every stage, and random operands. Results are compared with a
// 65-bit sum worked out in the testbench.
module ci_cska_tb;
  int checks = 0, failures = 0;

  logic [63:0] a, b, s_fss, s_vss;
  logic        cin, co_fss, co_vss;

  ci_cska dut_fss (.a(a), .b(b), .cin(cin), .s(s_fss), .cout(co_fss));
  ci_cska #(.WIDTH(64), .STAGE_SIZE('{0: 1, 1: 3, 2: 5, 3: 7, 4: 9, 5: 11, 6: 13, 7: 15, default: 0}))
    dut_vss (.a(a), .b(b), .cin(cin), .s(s_vss), .cout(co_vss));

  task automatic check(input logic [63:0] ta, tb_, input logic tc);
    logic [64:0] e;
    a = ta; b = tb_; cin = tc;
    #1;
    e = {1'b0, ta} + {1'b0, tb_} + 65'(tc);
    checks += 2;
    if ({co_fss, s_fss} !== e) begin failures++; $display("FAIL FSS a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {co_fss, s_fss}, e); end
    if ({co_vss, s_vss} !== e) begin failures++; $display("FAIL VSS a=%h b=%h cin=%b got %h exp %h", ta, tb_, tc, {co_vss, s_vss}, e); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(64'h0, 64'h0, 1'b0);
    check(64'hff, 64'h100, 1'b0);     // 0x1FF
    check(64'hff, 64'h100, 1'b1);     // 0x200
    check(64'h64, 64'h96, 1'b1);      // 0xFB
    check(64'd100, 64'd200, 1'b1);    // 301
    check('1, 64'h0, 1'b1);           // carry through every stage
    check('1, 64'h1, 1'b0);
    check('1, '1, 1'b1);
    check(64'h5555_5555_5555_5555, 64'haaaa_aaaa_aaaa_aaaa, 1'b1);
    for (int k = 0; k < 64; k++) begin
      // propagate everywhere above bit k, generate at bit k
      check(~(64'd1 << k), 64'd1 << k, 1'b1);
      check((64'd1 << k) | 64'h0, (64'd1 << k) | ~((64'd2 << k) - 1), 1'b0);
    end
    for (int i = 0; i < 5000; i++) begin
      logic [63:0] ra;
      ra = {$urandom, $urandom};
      check(ra, (i % 4 == 0) ? ~ra ^ 64'(1 << (i % 64)) : {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
