// Self-checking test of ci_cska_stage in both carry polarities (AOI stage with
// a true carry in, OAI stage with an inverted one), at 16 and 5 bits. The sum
// and the carry out are compared with a + b + cin; operands that make the
// whole stage propagate are forced often so the skip path is exercised.
module ci_cska_stage_tb;
  int checks = 0, failures = 0, skips = 0;

  logic [15:0] a, b, s_aoi, s_oai;
  logic [4:0]  a5, b5, s5;
  logic        cin, co_aoi, co_oai, co5;

  ci_cska_stage #(.M(16), .INV_IN(1'b0)) dut_aoi (.a(a), .b(b), .cin(cin),  .s(s_aoi), .cout(co_aoi));
  ci_cska_stage #(.M(16), .INV_IN(1'b1)) dut_oai (.a(a), .b(b), .cin(~cin), .s(s_oai), .cout(co_oai));
  ci_cska_stage #(.M(5),  .INV_IN(1'b1)) dut_5   (.a(a5), .b(b5), .cin(~cin), .s(s5), .cout(co5));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [16:0] e;
      logic [5:0]  e5;
      a = 16'($urandom); cin = 1'($urandom);
      b = (i % 3 == 0) ? ~a : 16'($urandom);   // all-propagate every third vector
      a5 = a[4:0]; b5 = b[4:0];
      #1;
      e  = {1'b0, a} + {1'b0, b} + 17'(cin);
      e5 = {1'b0, a5} + {1'b0, b5} + 6'(cin);
      if (&(a ^ b) && cin) skips++;
      checks += 3;
      if ({~co_aoi, s_aoi} !== e) begin failures++; $display("FAIL AOI a=%h b=%h cin=%b", a, b, cin); end
      if ({co_oai, s_oai} !== e)  begin failures++; $display("FAIL OAI a=%h b=%h cin=%b", a, b, cin); end
      if ({co5, s5} !== e5)       begin failures++; $display("FAIL 5-bit a=%h b=%h cin=%b", a5, b5, cin); end
    end
    checks++;
    if (skips == 0) begin failures++; $display("FAIL skip path never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
