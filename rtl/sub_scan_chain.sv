// sub_scan_chain: the scan flip-flops of one cluster linked into a chain.
//
// Cell 0 is the flip-flop nearest the cluster's shift-in pin and cell LEN-1
// drives the shift-out pin. (In the physical design the order is found by a
// nearest-neighbour walk on the placement starting at the shift-in pin; here
// the order is simply the index order of the d/q vectors.) When en and se
// are high the chain shifts one position per clock; when en is high and se
// low every cell captures its functional input d; when en is low the chain
// holds.
//
// Timing: so shows the old content of cell LEN-1 combinationally; after k
// shifts the first bit shifted in sits in cell k-1.
//
// That a sub-chain runs from a shift-in to a shift-out pin follows the
// document; the hold-by-enable in place of clock gating is this design's.
module sub_scan_chain #(
  parameter int unsigned LEN = 88   // scan flip-flops in this sub-chain (b17, 16 clusters)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,   // chain may change this cycle
  input  logic           se,   // 1: shift, 0: capture
  input  logic           si,   // shift-in (already masked)
  input  logic [LEN-1:0] d,    // functional inputs of the cells
  output logic [LEN-1:0] q,    // cell outputs to the circuit under test
  output logic           so    // shift-out
);

  logic [LEN:0] link;   // link[i] is the scan input of cell i

  assign link[0] = si;

  for (genvar i = 0; i < LEN; i++) begin : g_cell
    scan_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .se    (se),
      .d     (d[i]),
      .si    (link[i]),
      .q     (q[i])
    );
    assign link[i+1] = q[i];
  end

  assign so = link[LEN];

endmodule
