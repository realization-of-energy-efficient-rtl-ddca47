// Self-checking test of the one-cycle / two-cycle controller. Operations are
// offered with random gaps and each carries a random prediction, which the
// testbench presents on two_cycle while the operation is held. A reference
// model written in the testbench counts the cycles each operation has been
// held; capture, in_ready and stretched are compared with it every cycle, and
// the latency of every operation (1 or 2 cycles) is checked.
module vl_controller_tb;
  int checks = 0, failures = 0, ones = 0, twos = 0, back_to_back = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, two_cycle;
  logic in_ready, load, capture, stretched;

  vl_controller dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic held = 1'b0;          // an operation is in the operand register
  logic held_pred = 1'b0;     // its prediction
  int   held_cycles = 0;      // cycles it has spent there so far
  logic pend_pred;            // prediction of the operation being offered

  assign two_cycle = held ? held_pred : 1'b0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_capture, exp_ready;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    pend_pred = 1'($urandom);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      #1;
      exp_capture = held && (held_cycles + 1 == (held_pred ? 2 : 1));
      exp_ready   = !held || exp_capture;
      checks += 3;
      if (capture !== exp_capture) begin failures++; $display("FAIL capture at cycle %0d", cyc); end
      if (in_ready !== exp_ready) begin failures++; $display("FAIL in_ready at cycle %0d", cyc); end
      if (stretched !== (held && held_cycles == 1)) begin failures++; $display("FAIL stretched at cycle %0d", cyc); end
      if (exp_capture) begin
        if (held_pred) twos++; else ones++;
        if (in_valid) back_to_back++;
      end
      @(posedge clk);
      #1;
      // advance the reference model with what the edge did
      if (exp_ready) begin
        held = in_valid;
        held_cycles = 0;
        if (in_valid) begin
          held_pred = pend_pred;
          pend_pred = 1'($urandom);
        end
      end else begin
        held_cycles++;
      end
    end
    checks += 3;
    if (ones == 0) begin failures++; $display("FAIL no one-cycle operation"); end
    if (twos == 0) begin failures++; $display("FAIL no two-cycle operation"); end
    if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back operation"); end
    $display("one-cycle %0d, two-cycle %0d, back-to-back %0d", ones, twos, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
