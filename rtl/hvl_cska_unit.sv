// Clocked hybrid variable latency carry skip adder.
//
// Operands are loaded into an operand register when in_valid and in_ready are
// both high. The hybrid adder (hvl_cska) works on the registered operands and
// predicts from them whether the operation needs one clock period or two.
// vl_controller holds the operand register for a second cycle when two are
// needed, and captures sum and carry into the result register at the end of
// the last cycle; out_valid then pulses for one cycle.
//
// Latency: the result register loads on the first clock edge after the
// operand register loaded (one-cycle operation) or on the second (two-cycle
// operation); out_valid is high in the cycle after that edge. One-cycle operations are accepted every
// cycle; a two-cycle operation blocks in_ready for one cycle.
// Register placement and the handshake are this design's choices; the adder
// and its prediction follow the adder's description.
module hvl_cska_unit #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             out_two_cycle
);
  logic [WIDTH-1:0] a_q, b_q, sum;
  logic             cin_q, carry, two_cycle;
  logic             load, capture, stretched;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q   <= '0;
      b_q   <= '0;
      cin_q <= 1'b0;
    end else if (load) begin
      a_q   <= a;
      b_q   <= b;
      cin_q <= cin;
    end
  end

  hvl_cska #(.WIDTH(WIDTH)) u_adder (
    .a(a_q), .b(b_q), .cin(cin_q), .s(sum), .cout(carry), .two_cycle(two_cycle)
  );

  vl_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .two_cycle(two_cycle),
    .in_ready(in_ready), .load(load), .capture(capture), .stretched(stretched)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      s             <= '0;
      cout          <= 1'b0;
      out_two_cycle <= 1'b0;
    end else begin
      out_valid <= capture;
      if (capture) begin
        s             <= sum;
        cout          <= carry;
        out_two_cycle <= stretched;
      end
    end
  end
endmodule
