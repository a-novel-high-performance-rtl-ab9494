// dsf_scan_in_gate: scan-enable controlled gate at the head of a DSF scan chain.
//
// Inside a DSF cell the data input D of the flip-flop is a shared node: the
// functional input DI reaches it through a transmission gate that is on only in
// capture mode, and the scan input SI is wired to it directly. Within the chain,
// SI of every cell is the scan output of the previous cell, which is switched off
// in capture mode, so the shared node has one driver in each mode. The chain's
// external scan-in pin has no such switch of its own; this gate gives it one, so
// that the first cell sees the pin only in shift mode.
//   se = 1 (shift)  : so = si
//   se = 0 (capture): so is switched off; the two-state model drives it to 0.
// The position of this element in the chain and its SE control follow the
// architecture drawing; its exact circuit is not given and the behaviour above
// is this design's reading of it.
//
// Purely combinational; no clock.
module dsf_scan_in_gate
  import dsf_pkg::*;
(
  input  logic se,  // scan enable, 1 = shift
  input  logic si,  // external scan-in pin
  output logic so   // scan input of the first DSF cell
);

  always_comb begin
    unique case (se)
      SE_SHIFT:   so = si;
      SE_CAPTURE: so = 1'b0;  // switched off (floats in the circuit)
    endcase
  end

endmodule
