// cluster_ctrl: control circuit of one cluster's sub-scan-chain.
//
// A cluster is selected when both its column bit (from scan control 1) and
// its row bit (from scan control 2) are set. During a scan shift only a
// selected sub-chain is enabled; the others hold their contents, and their
// scan input is masked to 0 so that the shift-in line inside the cluster
// does not toggle either. While the control chains are being loaded every
// sub-chain holds. In capture mode every sub-chain captures.
//
// Interface: the two select bits, the two shift enables and the cluster's
// shift-in pin in; the chain enable, the chain's shift/capture select and the
// masked shift-in out. Purely combinational.
//
// Selecting by the AND of a column and a row control bit and masking the
// scan input follow the document. Which mode wins when both shift enables are
// high (control load) and capturing in every cluster are this design's
// choices.
module cluster_ctrl
  import scan_pkg::*;
(
  input  logic col_sel,    // bit of scan control 1 for this column
  input  logic row_sel,    // bit of scan control 2 for this row
  input  logic ctrl_se,    // control chains shifting
  input  logic scan_se,    // sub-chains shifting
  input  logic si,         // cluster shift-in pin
  output logic chain_en,   // sub-chain flip-flops may change
  output logic chain_se,   // sub-chain flip-flops shift (1) or capture (0)
  output logic si_masked,  // shift-in after masking
  output logic selected    // this cluster is selected by both controls
);

  scan_op_t op;

  always_comb begin
    op        = decode_op(ctrl_se, scan_se);
    selected  = col_sel & row_sel;
    si_masked = si & selected;
    chain_se  = (op == OP_SHIFT);
    unique case (op)
      OP_CAPTURE:   chain_en = 1'b1;
      OP_SHIFT:     chain_en = selected;
      default:      chain_en = 1'b0;
    endcase
  end

endmodule
