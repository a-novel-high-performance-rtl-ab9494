// tb_dsf_scan_chain_full: one complete scan test of the DSF chain at its default
// length (449 cells).
//
// The chain is instantiated with its default parameters and driven by
// dsf_chain_driver through reset, three patterns (load, capture, unload) and an
// asynchronous reset, with every so and c_out value checked.
module tb_dsf_scan_chain_full;
  localparam int unsigned N    = 449;  // default CHAIN_LEN of dsf_scan_chain
  localparam int unsigned NPAT = 3;

  logic clk = 1'b0;
  logic rst_n, se, si, so, done;
  logic [N-1:0] di, c_out;
  int checks, failures, shift_cycles, capture_cycles, mode_switches, resets, blocked;
  longint conv_trans, dsf_trans;
  int tb_checks = 0, tb_failures = 0;

  always #5 clk = ~clk;

  dsf_scan_chain dut (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si), .so(so), .di(di), .c_out(c_out)
  );

  dsf_chain_driver #(.N(N), .NPAT(NPAT)) drv (
    .clk(clk), .rst_n(rst_n), .se(se), .si(si), .di(di), .so(so), .c_out(c_out),
    .done(done), .checks(checks), .failures(failures),
    .conv_trans(conv_trans), .dsf_trans(dsf_trans),
    .shift_cycles(shift_cycles), .capture_cycles(capture_cycles),
    .mode_switches(mode_switches), .resets(resets), .blocked_cycles(blocked)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done);
    $display("shift=%0d capture=%0d mode_switches=%0d resets=%0d",
             shift_cycles, capture_cycles, mode_switches, resets);
    $display("logic-input transitions in shift mode: conventional=%0d DSF=%0d",
             conv_trans, dsf_trans);
    // Cycle count: (NPAT + 2) * N shift clocks + NPAT capture clocks.
    tb_checks++;
    if (shift_cycles != int'((NPAT + 2) * N) || capture_cycles != int'(NPAT)) begin
      tb_failures++;
      $display("FAIL cycle count: shift=%0d capture=%0d", shift_cycles, capture_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures);
    $finish;
  end
endmodule
