// 64-bit carry skip adders with concatenation and incrementation.
//
// Two adders stand side by side, each with its own ports:
//  * ci_*  : the CI-CSKA, a combinational 64-bit carry skip adder with four
//            16-bit stages whose skip logic is alternating AOI/OAI gates.
//  * hvl_* : the hybrid variable latency CI-CSKA, clocked, whose middle stage
//            is a Brent-Kung prefix adder; operations whose carries could take
//            the long path get two clock cycles, the rest one.
// They are alternatives proposed together; sharing nothing is this design's
// choice. See ci_cska and hvl_cska_unit for timing.
module cska64_top (
  // CI-CSKA, combinational
  input  logic [63:0] ci_a,
  input  logic [63:0] ci_b,
  input  logic        ci_cin,
  output logic [63:0] ci_s,
  output logic        ci_cout,
  // hybrid variable latency CI-CSKA, clocked
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hvl_in_valid,
  output logic        hvl_in_ready,
  input  logic [63:0] hvl_a,
  input  logic [63:0] hvl_b,
  input  logic        hvl_cin,
  output logic        hvl_out_valid,
  output logic [63:0] hvl_s,
  output logic        hvl_cout,
  output logic        hvl_out_two_cycle
);
  ci_cska u_ci_cska (
    .a(ci_a), .b(ci_b), .cin(ci_cin), .s(ci_s), .cout(ci_cout)
  );

  hvl_cska_unit u_hvl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(hvl_in_valid), .in_ready(hvl_in_ready),
    .a(hvl_a), .b(hvl_b), .cin(hvl_cin),
    .out_valid(hvl_out_valid), .s(hvl_s), .cout(hvl_cout),
    .out_two_cycle(hvl_out_two_cycle)
  );
endmodule
