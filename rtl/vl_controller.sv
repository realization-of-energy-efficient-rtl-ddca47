// One-cycle / two-cycle control of the variable latency adder.
//
// The hybrid adder is clocked with a period that covers only its short paths.
// When the prediction (two_cycle, the nucleus propagate of the operands now in
// the operand register) says a long path may be active, the operation is given
// a second clock period: the operand register is held for one more cycle and
// the result is captured at the end of that second cycle. Otherwise the result
// is captured after one cycle and a new operation may be loaded in the same
// cycle, so one-cycle operations stream at one per clock.
//
// This realises the "clock stretching" of the adder's description as a stall,
// with a fixed clock; the valid/ready handshake, the synchronous active-low
// reset and the absence of output back-pressure are this design's choices.
//
// Timing: load in cycle t (in_valid & in_ready) -> the operands sit in the
// operand register in cycle t+1 -> capture at the end of cycle t+1 (one-cycle)
// or t+2 (two-cycle, stretched = 1 in cycle t+2).
module vl_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic two_cycle,
  output logic in_ready,
  output logic load,
  output logic capture,
  output logic stretched
);
  logic busy;          // the operand register holds an operation
  logic stretch_q;     // that operation is in its second cycle

  assign stretched = stretch_q;
  assign capture   = busy && (!two_cycle || stretch_q);
  assign in_ready  = !busy || capture;
  assign load      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      stretch_q <= 1'b0;
    end else if (in_ready) begin
      busy      <= in_valid;
      stretch_q <= 1'b0;
    end else begin
      // busy, two-cycle operation, first cycle done: take the second
      stretch_q <= 1'b1;
    end
  end

  // a stretched cycle always ends with a capture
  assert property (@(posedge clk) disable iff (!rst_n) stretch_q |-> capture);
  // an operation is never held for more than two cycles
  assert property (@(posedge clk) disable iff (!rst_n) stretch_q |=> !stretch_q);
endmodule
