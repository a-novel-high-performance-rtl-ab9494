// dsf_pkg: shared constants of the dmuxed scan flip-flop (DSF) scan architecture.
//
// The whole architecture is steered by one scan-enable line, SE. With SE = 0 the
// cells capture functional data (capture mode); with SE = 1 they form a shift
// register and the inputs of the combinational logic are held low (shift mode).
// This encoding follows the design description; the package only gives the two
// values names so that every module compares against the same constants.
package dsf_pkg;

  // Value of SE in each scan mode.
  localparam logic SE_CAPTURE = 1'b0;
  localparam logic SE_SHIFT   = 1'b1;

  // Level that a blocked functional output is held at during shift mode
  // (the pull-down transistor of the dmux forces it low).
  localparam logic BLOCKED_LEVEL = 1'b0;

endpackage
