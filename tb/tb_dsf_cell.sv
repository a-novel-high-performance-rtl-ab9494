// tb_dsf_cell: self-checking test of one dmuxed scan flip-flop.
//
// Replays the sequence of the cell's reference waveform (shift phase, capture
// phase, reset phase) and then random traffic. A reference bit q_ref is kept
// independently: on each rising clock edge it takes si in shift mode and di in
// capture mode, and it clears while rst_n is low. After every change the outputs
// are compared with the expected values: c_out = q_ref in capture and 0 in shift,
// s_out = q_ref in shift and 0 in capture. Each output follows its input by
// exactly one clock (one-cycle latency), which the per-cycle comparison checks.
module tb_dsf_cell;
  logic clk = 1'b0, rst_n, se, di, si;
  logic c_out, s_out;
  logic q_ref;
  int checks = 0, failures = 0;
  int shift_cycles = 0, capture_cycles = 0, resets = 0, blocked = 0;

  dsf_cell dut (.clk(clk), .rst_n(rst_n), .se(se), .di(di), .si(si),
                .c_out(c_out), .s_out(s_out));

  always #50 clk = ~clk;  // 100 ns period, as in the reference waveform

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(input string tag);
    logic exp_c, exp_s;
    exp_c = se ? 1'b0 : q_ref;
    exp_s = se ? q_ref : 1'b0;
    checks++;
    if (c_out !== exp_c || s_out !== exp_s) begin
      failures++;
      $display("FAIL %s t=%0t se=%0b q_ref=%0b: c_out=%0b (exp %0b) s_out=%0b (exp %0b)",
               tag, $time, se, q_ref, c_out, exp_c, s_out, exp_s);
    end
  endtask

  // One clock cycle with the given inputs applied after the falling edge.
  task automatic cycle(input logic se_v, input logic di_v, input logic si_v);
    @(negedge clk);
    se = se_v; di = di_v; si = si_v;
    #1 check_outputs("pre-edge");
    @(posedge clk);
    if (rst_n) begin
      q_ref = se ? si : di;
      if (se) begin
        shift_cycles++;
        if (q_ref) blocked++;  // a 1 held in the cell that the logic never sees
      end else capture_cycles++;
    end
    #1 check_outputs("post-edge");
  endtask

  initial begin
    rst_n = 1'b0; se = 1'b1; di = 1'b0; si = 1'b0; q_ref = 1'b0;
    repeat (2) @(posedge clk);
    #1 check_outputs("in reset");
    resets++;
    rst_n = 1'b1;

    // Shift phase: SI toggles, DI toggles; c_out must stay low.
    for (int k = 0; k < 5; k++) cycle(1'b1, k[0], ~k[0]);
    // Capture phase: DI reaches c_out one clock later.
    for (int k = 0; k < 4; k++) cycle(1'b0, ~k[0], k[0]);

    // Reset phase: asynchronous clear in the middle of a cycle.
    @(negedge clk);
    cycle(1'b0, 1'b1, 1'b0);  // make sure q = 1
    #20 rst_n = 1'b0;
    q_ref = 1'b0;
    #1 check_outputs("async reset");
    resets++;
    @(posedge clk);
    #1 check_outputs("held in reset");
    rst_n = 1'b1;

    // Random traffic.
    for (int k = 0; k < 400; k++)
      cycle(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));

    checks++;
    if (shift_cycles == 0 || capture_cycles == 0 || resets < 2 || blocked == 0) begin
      failures++;
      $display("FAIL coverage: shift=%0d capture=%0d resets=%0d blocked=%0d",
               shift_cycles, capture_cycles, resets, blocked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
