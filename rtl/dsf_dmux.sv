// dsf_dmux: output demultiplexer of a DSF cell, with pull-down on the functional output.
//
// The flip-flop output Q is steered by the select S (the scan enable) to one of two
// destinations:
//   S = 0 (capture): c_out = Q, the functional output that feeds the combinational
//                    logic. The scan-out branch is switched off.
//   S = 1 (shift)  : s_out = Q, the scan output that feeds the next cell. The
//                    functional branch is switched off and a pull-down device
//                    holds c_out low, so shifting data never reaches the logic.
// In the transistor circuit each branch is a transmission gate and the scan-out
// branch floats while it is switched off. A two-state RTL model has no floating
// value, so here an unselected s_out is driven to 0; that is this model's choice.
// The low level of the blocked c_out follows the design description.
//
// Purely combinational; no clock.
module dsf_dmux
  import dsf_pkg::*;
(
  input  logic q,      // flip-flop output
  input  logic s,      // select: the scan enable, 1 = shift
  output logic c_out,  // normal (functional) output to the combinational logic
  output logic s_out   // scan output to the next cell of the chain
);

  always_comb begin
    unique case (s)
      SE_SHIFT: begin
        c_out = BLOCKED_LEVEL;  // pull-down on, functional branch off
        s_out = q;
      end
      SE_CAPTURE: begin
        c_out = q;
        s_out = 1'b0;           // scan branch off (floats in the circuit)
      end
    endcase
  end

endmodule
