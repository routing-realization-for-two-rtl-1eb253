// scan_cluster: one cluster of the two-dimensional scan array.
//
// A cluster holds a sub-scan-chain of LEN scan flip-flops and its own control
// circuit. The control circuit selects the cluster when both its column bit
// (scan control 1) and row bit (scan control 2) are set; only then does the
// sub-chain shift during a scan shift, and only then does the shift-in pin
// reach it. Unselected clusters hold their contents and so do not switch.
//
// Interface: column and row select bits, the two shift enables, the cluster's
// own shift-in and shift-out pins, and the functional d/q of its cells.
// Timing is that of sub_scan_chain: one shift per clock while selected.
//
// An assertion states the low-power rule: a cluster that is not selected
// during a shift, or any cluster during a control-chain load, keeps every
// flip-flop unchanged. The assertion is disabled during reset, which is why
// a lint tool sees rst_n used both asynchronously (in the flip-flops) and
// synchronously (in the assertion); that use is intended.
//
// Structure and selection follow the document; the port list is this
// design's.
module scan_cluster #(
  parameter int unsigned LEN = 88
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           col_sel,
  input  logic           row_sel,
  input  logic           ctrl_se,
  input  logic           scan_se,
  input  logic           scan_in,
  output logic           scan_out,
  output logic           selected,
  input  logic [LEN-1:0] func_d,
  output logic [LEN-1:0] func_q
);

  logic chain_en, chain_se, si_masked;

  cluster_ctrl u_ctrl (
    .col_sel   (col_sel),
    .row_sel   (row_sel),
    .ctrl_se   (ctrl_se),
    .scan_se   (scan_se),
    .si        (scan_in),
    .chain_en  (chain_en),
    .chain_se  (chain_se),
    .si_masked (si_masked),
    .selected  (selected)
  );

  sub_scan_chain #(.LEN(LEN)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (chain_en),
    .se    (chain_se),
    .si    (si_masked),
    .d     (func_d),
    .q     (func_q),
    .so    (scan_out)
  );

  // Skipped clusters do not switch.
  a_skip_holds: assert property (
    @(posedge clk) disable iff (!rst_n)
    (ctrl_se || (scan_se && !selected)) |=> $stable(func_q)
  ) else $error("scan_cluster: skipped sub-chain changed state");

endmodule
