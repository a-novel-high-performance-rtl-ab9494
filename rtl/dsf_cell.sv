// dsf_cell: dmuxed scan flip-flop (DSF), a low shift-power replacement for the
// muxed scan flip-flop.
//
// A conventional muxed scan cell selects between functional data DI and scan data
// SI in front of the flip-flop, and its single output Q drives both the
// combinational logic and the next cell, so every shift clock toggles the logic
// inputs. The DSF moves the split to the output side:
//   * Input: DI passes through a transmission gate that is on only in capture
//     mode (SE = 0); SI is wired to the same D node and is driven only in shift
//     mode (by the previous cell's scan output). This model writes that shared
//     node as a two-way selection on SE.
//   * Storage: one positive-edge D flip-flop.
//   * Output: a dmux (dsf_dmux) sends Q to c_out in capture mode and to s_out in
//     shift mode, and holds c_out low during shift.
// Capture mode therefore behaves like a muxed scan flip-flop, while in shift
// mode the combinational logic sees a constant 0.
//
// Timing: D is sampled on the rising edge of clk; c_out and s_out are
// combinational in Q and se, so c_out drops to 0 in the same cycle se rises.
// Reset: rst_n is an asynchronous, active-low clear of the flip-flop. The design
// shows a reset phase in its waveform but does not say how reset is applied;
// the asynchronous active-low clear is this design's choice.
module dsf_cell
  import dsf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,  // asynchronous active-low reset
  input  logic se,     // scan enable: 0 = capture, 1 = shift
  input  logic di,     // functional data in, from the combinational logic
  input  logic si,     // scan in, from the previous cell's s_out
  output logic c_out,  // normal out, to the combinational logic (0 in shift)
  output logic s_out   // scan out, to the next cell (0 in capture)
);

  logic d;  // shared D node of the flip-flop
  logic q;

  // Transmission gate on DI (on when se = 0) and the directly wired SI.
  always_comb d = (se == SE_SHIFT) ? si : di;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  dsf_dmux u_dmux (
    .q    (q),
    .s    (se),
    .c_out(c_out),
    .s_out(s_out)
  );

endmodule
