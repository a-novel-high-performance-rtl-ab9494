// tb_itc99_workloads: scan tests at the sizes of the ITC'99 benchmark circuits.
//
// The DSF architecture was evaluated on ten fully scanned ITC'99 circuits. Their
// flip-flop counts and test-pattern counts are used here: for each circuit a
// dsf_scan_chain of that many cells receives that many random patterns (load,
// capture, unload) through dsf_chain_driver, which checks every so and c_out
// value. The circuits' own logic is not available, so each chain is closed
// through the driver's small stand-in function; the transition counts printed
// are therefore those at the logic inputs of that stand-in, for a conventional
// muxed scan chain and for the DSF chain, not the benchmark figures.
//
//   circuit  B01 B02 B03 B06 B07 B08 B09 B10 B12 B15
//   F/F        5   4  30   9  49  21  28  17 121 449
//   patterns  21  14  39  20  88  57  48  69 185 618
module tb_itc99_workloads;
  localparam int NB = 10;
  localparam int unsigned FF  [NB] = '{5, 4, 30, 9, 49, 21, 28, 17, 121, 449};
  localparam int unsigned PATS[NB] = '{21, 14, 39, 20, 88, 57, 48, 69, 185, 618};
  localparam string       NAME[NB] = '{"B01", "B02", "B03", "B06", "B07",
                                       "B08", "B09", "B10", "B12", "B15"};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   done       [NB];
  int     checks     [NB];
  int     failures   [NB];
  longint conv_trans [NB];
  longint dsf_trans  [NB];

  for (genvar b = 0; b < NB; b++) begin : g_bench
    localparam int unsigned N = FF[b];
    logic rst_n, se, si, so;
    logic [N-1:0] di, c_out;
    int shift_cycles, capture_cycles, mode_switches, resets, blocked;

    dsf_scan_chain #(.CHAIN_LEN(N)) dut (
      .clk(clk), .rst_n(rst_n), .se(se), .si(si), .so(so), .di(di), .c_out(c_out)
    );

    dsf_chain_driver #(.N(N), .NPAT(PATS[b])) drv (
      .clk(clk), .rst_n(rst_n), .se(se), .si(si), .di(di), .so(so), .c_out(c_out),
      .done(done[b]), .checks(checks[b]), .failures(failures[b]),
      .conv_trans(conv_trans[b]), .dsf_trans(dsf_trans[b]),
      .shift_cycles(shift_cycles), .capture_cycles(capture_cycles),
      .mode_switches(mode_switches), .resets(resets), .blocked_cycles(blocked)
    );
  end

  function automatic int total(input int v[NB]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (done[i]) all_done &= done[i];
    end while (!all_done);
    foreach (done[i])
      $display("%s: %0d cells, %0d patterns, logic-input transitions in shift: conventional=%0d DSF=%0d (%0.1f%% fewer)",
               NAME[i], FF[i], PATS[i], conv_trans[i], dsf_trans[i],
               100.0 * real'(conv_trans[i] - dsf_trans[i]) / real'(conv_trans[i]));
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
