// dsf_scan_chain: full-scan chain built from dmuxed scan flip-flops (DSF).
//
// Every state flip-flop of a circuit is replaced by a dsf_cell. The cells are
// linked head to tail: the scan input pin goes through an SE-controlled gate
// (dsf_scan_in_gate) into cell 0, the scan output of cell i feeds the scan input
// of cell i+1, and the scan output of the last cell is the chain's scan-out pin.
// The combinational logic of the circuit under test is outside this module: it
// receives c_out and returns di, one bit per cell.
//
// Modes (one scan-enable line, se):
//   se = 1, shift  : the chain is a CHAIN_LEN-bit shift register from si to so.
//                    Cell 0 takes si; so carries the last cell's bit. All c_out
//                    bits are held at 0, so the logic sees no switching.
//   se = 0, capture: each cell loads di[i] on the clock edge and shows its bit
//                    on c_out[i]; so is switched off (0 in this model).
// A test pattern is applied by CHAIN_LEN shift clocks, then one capture clock,
// then CHAIN_LEN shift clocks that unload the response while the next pattern
// loads. Bit i of the pattern must enter at si as the (CHAIN_LEN-i)-th shifted
// bit; the response bit of cell CHAIN_LEN-1 appears on so first.
//
// Timing: all cells share clk and sample on its rising edge; so and c_out are
// combinational from the cells' flip-flops and se. rst_n clears every cell
// asynchronously (active low). An assertion checks on every clock in shift mode
// that all c_out bits are 0.
//
// The chain structure, the cell, the scan-in gate and the single SE/CLK lines
// follow the design description. The chain length is not given there; the
// default of 449 is the largest flip-flop count among the benchmark circuits the
// architecture was evaluated on, so each of them fits in one chain.
module dsf_scan_chain
  import dsf_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = 449
) (
  input  logic                 clk,
  input  logic                 rst_n,  // asynchronous active-low reset
  input  logic                 se,     // scan enable: 0 = capture, 1 = shift
  input  logic                 si,     // scan-in pin
  output logic                 so,     // scan-out pin
  input  logic [CHAIN_LEN-1:0] di,     // functional data from the combinational logic
  output logic [CHAIN_LEN-1:0] c_out   // cell outputs to the combinational logic
);

  logic                 si_head;  // scan input of cell 0, after the gate
  logic [CHAIN_LEN-1:0] s_out;    // scan output of each cell

  dsf_scan_in_gate u_si_gate (
    .se(se),
    .si(si),
    .so(si_head)
  );

  for (genvar i = 0; i < CHAIN_LEN; i++) begin : g_cell
    logic cell_si;
    if (i == 0) begin : g_head
      assign cell_si = si_head;
    end else begin : g_body
      assign cell_si = s_out[i-1];
    end

    dsf_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .se   (se),
      .di   (di[i]),
      .si   (cell_si),
      .c_out(c_out[i]),
      .s_out(s_out[i])
    );
  end

  assign so = s_out[CHAIN_LEN-1];

  // The point of the architecture: in shift mode the combinational logic sees
  // a constant 0 on every cell output, whatever is being shifted.
  always_ff @(posedge clk) begin
    if (se == SE_SHIFT)
      assert (c_out == '0)
        else $error("dsf_scan_chain: c_out not blocked in shift mode");
  end

endmodule
