// Self-checking test of the modified Brent-Kung nucleus adder: exhaustive at
// the 8-bit default (all a, b and carry-in), random at 16 and 4 bits. The sum
// must equal a + b + cin, G_M:1 the carry out with carry-in zero and P_M:1
// the AND of all bit propagates.
module bk_ppa_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic [3:0]  a4, b4, s4;
  logic        cin, g8, p8, g16, p16, g4, p4;

  bk_ppa dut8 (.a(a8), .b(b8), .cin(cin), .s(s8), .g_grp(g8), .p_grp(p8));
  bk_ppa #(.M(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .g_grp(g16), .p_grp(p16));
  bk_ppa #(.M(4))  dut4  (.a(a4), .b(b4), .cin(cin), .s(s4), .g_grp(g4), .p_grp(p4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      logic [8:0] e8, e8z;
      logic [16:0] e16, e16z;
      logic [4:0]  e4, e4z;
      {cin, a8, b8} = v[16:0];
      a16 = 16'($urandom); b16 = (v % 5 == 0) ? ~a16 : 16'($urandom);
      a4 = a8[3:0]; b4 = b8[3:0];
      #1;
      e8  = {1'b0, a8} + {1'b0, b8} + 9'(cin);
      e8z = {1'b0, a8} + {1'b0, b8};
      e16  = {1'b0, a16} + {1'b0, b16} + 17'(cin);
      e16z = {1'b0, a16} + {1'b0, b16};
      e4  = {1'b0, a4} + {1'b0, b4} + 5'(cin);
      e4z = {1'b0, a4} + {1'b0, b4};
      checks += 3;
      if (s8 !== e8[7:0] || g8 !== e8z[8] || p8 !== &(a8 ^ b8)) begin
        failures++; $display("FAIL M=8 a=%h b=%h cin=%b s=%h g=%b p=%b", a8, b8, cin, s8, g8, p8);
      end
      if (s16 !== e16[15:0] || g16 !== e16z[16] || p16 !== &(a16 ^ b16)) begin
        failures++; $display("FAIL M=16 a=%h b=%h cin=%b", a16, b16, cin);
      end
      if (s4 !== e4[3:0] || g4 !== e4z[4] || p4 !== &(a4 ^ b4)) begin
        failures++; $display("FAIL M=4 a=%h b=%h cin=%b", a4, b4, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
