// tb_dsf_scan_in_gate: exhaustive self-checking test of the chain-head scan-in gate.
// The gate must pass si when se = 1 and present 0 (switched off) when se = 0.
module tb_dsf_scan_in_gate;
  logic se, si, so;
  int checks = 0, failures = 0;

  dsf_scan_in_gate dut (.se(se), .si(si), .so(so));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic exp;
      {se, si} = (n < 4) ? n[1:0] : 2'($urandom_range(0, 3));
      #1;
      exp = se ? si : 1'b0;
      checks++;
      if (so !== exp) begin
        failures++;
        $display("FAIL se=%0b si=%0b: so=%0b (exp %0b)", se, si, so, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
