// dsf_chain_driver: test sequencer and checker for one DSF scan chain.
//
// Drives a dsf_scan_chain of N cells through complete scan tests and checks every
// output against values worked out from the applied patterns alone:
//   * reset      : rst_n low for two clocks; all c_out and so must be 0.
//   * load/unload: N shift clocks (se = 1) shift pattern P in through si while
//                 the response of the previous pattern comes out on so,
//                 most distant cell first. c_out must read 0 on every shift clock.
//   * capture    : one clock with se = 0; c_out must equal P (the cells show
//                 their contents to the logic) and so must be 0 (switched off);
//                 the cells load the logic's answer R = cut(P).
//   * async reset: after the last pattern is loaded, rst_n is pulsed in the
//                 middle of a cycle; the unload that follows must be all zeros.
// The circuit under test is replaced by a small stand-in function, cut(), of the
// cell outputs and an 8-bit primary-input word that changes with every pattern.
//
// Alongside the chain the driver keeps a model of a conventional muxed scan
// chain whose flip-flop outputs feed the logic directly. On every shift clock it
// counts the transitions that each chain presents at the logic inputs: conv_trans
// for the conventional chain, dsf_trans for c_out of the DSF chain. dsf_trans may
// only contain the single drop to 0 of each cell that held a 1 when shift mode
// began; any later c_out transition in shift mode is a failure.
//
// Stimulus changes just after the falling clock edge; outputs are checked one
// time unit later, before the rising edge on which the chain samples.
module dsf_chain_driver #(
  parameter int unsigned N    = 8,   // cells in the chain
  parameter int unsigned NPAT = 4    // test patterns applied
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         se,
  output logic         si,
  output logic [N-1:0] di,
  input  logic         so,
  input  logic [N-1:0] c_out,
  output logic         done,
  output int           checks,
  output int           failures,
  output longint       conv_trans,     // logic-input transitions, conventional chain
  output longint       dsf_trans,      // logic-input transitions, DSF chain
  output int           shift_cycles,
  output int           capture_cycles,
  output int           mode_switches,  // se changes
  output int           resets,
  output int           blocked_cycles  // shift clocks whose switching the DSF blocked
);

  logic [7:0]   pi;          // primary inputs of the stand-in logic
  logic [N-1:0] conv_q;      // conventional muxed scan chain model
  logic [N-1:0] c_out_prev;
  logic         se_prev;
  logic         in_shift;    // at least one shift sample taken since se rose

  // Stand-in combinational logic: each output mixes a cell with its neighbour
  // and one primary input.
  function automatic logic [N-1:0] cut(input logic [N-1:0] x, input logic [7:0] p);
    logic [N-1:0] y;
    for (int i = 0; i < int'(N); i++)
      y[i] = x[(i + 1) % N] ^ (x[i] & p[i % 8]);
    return y;
  endfunction

  function automatic logic [N-1:0] rand_pattern(input int kind);
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i++)
      case (kind)
        0:       v[i] = i[0];                 // alternating 0101...
        1:       v[i] = 1'b1;                 // all ones
        default: v[i] = 1'($urandom_range(0, 1));
      endcase
    return v;
  endfunction

  always_comb di = cut(c_out, pi);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d t=%0t %s", N, $time, what);
    end
  endtask

  // Conventional chain model and transition counting, on every rising edge.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_q <= '0;
    end else if (se) begin
      logic [N-1:0] nxt;
      nxt = {conv_q[N-2:0], si};
      conv_trans += longint'($countones(nxt ^ conv_q));
      if (nxt != conv_q) blocked_cycles++;
      conv_q <= nxt;
    end else begin
      conv_q <= cut(conv_q, pi);
    end
  end

  // c_out transitions while in shift mode, sampled after each stimulus change.
  task automatic sample_c_out();
    if (se) begin
      int t;
      t = $countones(c_out ^ c_out_prev);
      dsf_trans += longint'(t);
      if (in_shift) check(t == 0, "c_out switched during shift mode");
      in_shift = 1'b1;
    end else begin
      in_shift = 1'b0;
    end
    if (se != se_prev) mode_switches++;
    se_prev    = se;
    c_out_prev = c_out;
  endtask

  // One clock: apply se/si after the falling edge, return before the rising edge.
  task automatic drive(input logic se_v, input logic si_v);
    @(negedge clk);
    se = se_v;
    si = si_v;
    #1 sample_c_out();
  endtask

  initial begin
    logic [N-1:0] pat, resp, prev_resp;
    logic         have_resp;
    done = 1'b0; checks = 0; failures = 0;
    conv_trans = 0; dsf_trans = 0; shift_cycles = 0; capture_cycles = 0;
    mode_switches = 0; resets = 0; blocked_cycles = 0;
    rst_n = 1'b0; se = 1'b1; si = 1'b0; pi = 8'h00;
    c_out_prev = '0; se_prev = 1'b1; in_shift = 1'b0;
    prev_resp = '0; have_resp = 1'b0;

    repeat (2) @(posedge clk);
    #1 check(c_out == '0 && so == 1'b0, "outputs not cleared by reset");
    resets++;
    rst_n = 1'b1;

    for (int p = 0; p < int'(NPAT); p++) begin
      pat = rand_pattern(p);
      // Load pattern p, unload the previous response.
      for (int k = 0; k < int'(N); k++) begin
        drive(1'b1, pat[N-1-k]);
        check(c_out == '0, "c_out not held low in shift mode");
        if (have_resp)
          check(so == prev_resp[N-1-k], $sformatf("unload bit %0d of pattern %0d", N-1-k, p-1));
        shift_cycles++;
      end
      // Capture.
      @(negedge clk);
      se = 1'b0;
      pi = 8'($urandom);
      #1 sample_c_out();
      check(c_out == pat, "c_out does not show the loaded pattern in capture mode");
      check(so == 1'b0, "so not switched off in capture mode");
      resp = cut(pat, pi);
      check(di == resp, "stand-in logic answer");
      capture_cycles++;
      prev_resp = resp;
      have_resp = 1'b1;
    end

    // Final unload, loading one more pattern at the same time.
    pat = rand_pattern(2);
    for (int k = 0; k < int'(N); k++) begin
      drive(1'b1, pat[N-1-k]);
      check(c_out == '0, "c_out not held low in shift mode");
      check(so == prev_resp[N-1-k], $sformatf("final unload bit %0d", N-1-k));
      shift_cycles++;
    end

    // Asynchronous reset between clock edges, then unload: all zeros.
    @(posedge clk);
    #2 rst_n = 1'b0;
    #1 check(c_out == '0 && so == 1'b0, "asynchronous reset");
    resets++;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < int'(N); k++) begin
      drive(1'b1, 1'b0);
      check(so == 1'b0, "cell not cleared by asynchronous reset");
      shift_cycles++;
    end

    // Every mechanism must have happened, and the DSF must have blocked switching.
    check(shift_cycles > 0 && capture_cycles > 0 && resets >= 2 && mode_switches >= 2,
          "a scan mode was never exercised");
    check(conv_trans > 0 && blocked_cycles > 0, "no shift switching to block");
    check(dsf_trans < conv_trans, "DSF chain did not reduce logic-input transitions");
    done = 1'b1;
  end

endmodule
