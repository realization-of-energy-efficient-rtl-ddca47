// Self-checking test of ci_skip_logic: every input combination of both forms.
// The expected carry G | P & C is computed in the testbench; the AOI form must
// give it inverted from true inputs, the OAI form true from inverted g and cin.
module ci_skip_logic_tb;
  int checks = 0, failures = 0;
  logic g, p, c, cout_aoi, cout_oai;

  ci_skip_logic #(.OAI(1'b0)) dut_aoi (.g(g),  .p_grp(p), .cin(c),  .cout(cout_aoi));
  ci_skip_logic #(.OAI(1'b1)) dut_oai (.g(~g), .p_grp(p), .cin(~c), .cout(cout_oai));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_c;
      {g, p, c} = v[2:0];
      #1;
      exp_c = g | (p & c);
      checks += 2;
      if (cout_aoi !== ~exp_c) begin failures++; $display("FAIL AOI g=%b p=%b c=%b", g, p, c); end
      if (cout_oai !==  exp_c) begin failures++; $display("FAIL OAI g=%b p=%b c=%b", g, p, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
