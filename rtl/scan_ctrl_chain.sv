// scan_ctrl_chain: scan control chain of the two-dimensional shift control.
//
// A chain of N scan flip-flops that is loaded serially. Scan control 1 is one
// such chain with one flip-flop per column of clusters, scan control 2 one
// with a flip-flop per row. Bit i of sel enables column (or row) i. While se
// is high the chain shifts: si enters bit 0 and every bit moves up by one, so
// the value for bit i must be applied N-1-i cycles before the last shift.
// so is bit N-1, which lets the chains be cascaded or read back. With se low
// the chain holds, so the selection stays stable while the sub-chains shift.
//
// Timing: one shift per rising clock edge while se is high; sel changes
// one cycle after each shift. rst_n clears the chain (nothing selected).
//
// The chain of scan flip-flops with one bit per column or row follows the
// document; the shift direction, the read-back output and the reset are
// choices of this design.
module scan_ctrl_chain #(
  parameter int unsigned N = 4   // scan flip-flops in the chain (N_CTRL1 or N_CTRL2)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         se,    // shift enable of the control chain
  input  logic         si,    // serial control input
  output logic [N-1:0] sel,   // one select bit per column / row
  output logic         so     // serial output (last flip-flop)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= '0;
    end else if (se) begin
      sel <= N'({sel, si});   // drop the old bit N-1, si enters bit 0
    end
  end

  assign so = sel[N-1];

endmodule
