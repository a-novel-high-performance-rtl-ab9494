// tb_dsf_scan_chain: end-to-end test of the DSF scan chain at a reduced length.
//
// An 8-cell chain is taken through reset, six complete scan tests (load, capture,
// unload) with a stand-in combinational logic, and an asynchronous reset, by
// dsf_chain_driver, which checks every so and c_out value. The test counts how
// often each mechanism happened (shift clocks, capture clocks, scan-enable
// switches, resets, shift clocks whose switching the DSF blocked) and fails if
// one never did. It also checks the cycle count of a scan test: a pattern of N
// bits needs exactly N shift clocks plus one capture clock, and the response
// of cell N-1 appears on so on the first unload clock.
module tb_dsf_scan_chain;
  localparam int unsigned N    = 8;
  localparam int unsigned NPAT = 6;

  logic clk = 1'b0;
  logic rst_n, se, si, so, done;
  logic [N-1:0] di, c_out;
  int checks, failures, shift_cycles, capture_cycles, mode_switches, resets, blocked;
  longint conv_trans, dsf_trans;
  int cycles = 0;
  int tb_checks = 0, tb_failures = 0;

  always #5 clk = ~clk;  // 100 MHz
  always @(posedge clk) cycles++;

  dsf_scan_chain #(.CHAIN_LEN(N)) dut (
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
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done);
    // Cycle count: (NPAT + 2) * N shift clocks + NPAT capture clocks.
    tb_checks++;
    if (shift_cycles != int'((NPAT + 2) * N) || capture_cycles != int'(NPAT)) begin
      tb_failures++;
      $display("FAIL cycle count: shift=%0d capture=%0d", shift_cycles, capture_cycles);
    end
    $display("shift=%0d capture=%0d mode_switches=%0d resets=%0d blocked_cycles=%0d",
             shift_cycles, capture_cycles, mode_switches, resets, blocked);
    $display("logic-input transitions in shift mode: conventional=%0d DSF=%0d",
             conv_trans, dsf_trans);
    $display("TB_RESULT checks=%0d failures=%0d", checks + tb_checks, failures + tb_failures);
    $finish;
  end
endmodule
