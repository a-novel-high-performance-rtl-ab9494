// tb_dsf_dmux: exhaustive self-checking test of the DSF output dmux.
// All four (s, q) combinations are applied several times in random order and the
// outputs are compared with the truth table: s = 0 gives c_out = q, s_out = 0;
// s = 1 gives c_out = 0 (pulled low), s_out = q.
module tb_dsf_dmux;
  logic q, s, c_out, s_out;
  int checks = 0, failures = 0;

  dsf_dmux dut (.q(q), .s(s), .c_out(c_out), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_c, input logic exp_s);
    checks++;
    if (c_out !== exp_c || s_out !== exp_s) begin
      failures++;
      $display("FAIL s=%0b q=%0b: c_out=%0b (exp %0b) s_out=%0b (exp %0b)",
               s, q, c_out, exp_c, s_out, exp_s);
    end
  endtask

  initial begin
    for (int n = 0; n < 64; n++) begin
      logic [1:0] v;
      v = (n < 4) ? n[1:0] : 2'($urandom_range(0, 3));
      {s, q} = v;
      #1;
      if (s) check(1'b0, q);
      else   check(q, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
