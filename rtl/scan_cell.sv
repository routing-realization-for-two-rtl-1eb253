// scan_cell: mux-D scan flip-flop with a clock enable.
//
// The cell is the D flip-flop of the circuit under test after scan
// replacement. With se high it loads its scan input si (shift); with se low
// it loads its functional input d (capture). The enable en stands for the
// gated clock of a sub-scan-chain that the two-dimensional control has not
// selected: with en low the cell keeps its value and does not toggle.
//
// Timing: one rising-edge register, q changes one cycle after en is sampled
// high. rst_n is an asynchronous active-low reset to 0.
//
// The document only names the scan flip-flop; the clock enable in place of a
// gated clock and the reset are choices of this design.
module scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic en,   // cell may change this cycle
  input  logic se,   // 1: shift from si, 0: capture d
  input  logic d,    // functional data input
  input  logic si,   // scan input
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= se ? si : d;
  end

endmodule
