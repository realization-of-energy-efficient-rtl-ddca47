// Self-checking test of ci_incrementer: s must equal z + cin modulo 2^M, with
// the final carry dropped. Exhaustive for M = 8, random plus the all-ones
// wrap-around case for M = 16.
module ci_incrementer_tb;
  int checks = 0, failures = 0;

  logic [7:0]  z8, s8;
  logic [15:0] z16, s16;
  logic        cin;

  ci_incrementer #(.M(8))  dut8  (.z(z8),  .cin(cin), .s(s8));
  ci_incrementer #(.M(16)) dut16 (.z(z16), .cin(cin), .s(s16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      z8 = v[7:0]; cin = v[8]; z16 = 16'($urandom);
      if (v == 511) z16 = '1;
      #1;
      checks += 2;
      if (s8 !== 8'(z8 + 8'(cin))) begin failures++; $display("FAIL 8 z=%h cin=%b s=%h", z8, cin, s8); end
      if (s16 !== 16'(z16 + 16'(cin))) begin failures++; $display("FAIL 16 z=%h cin=%b s=%h", z16, cin, s16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
