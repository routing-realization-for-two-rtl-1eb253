// twod_scan_top: multiple scan chain design with two-dimensional low power
// scan shift control.
//
// The scan flip-flops of the circuit under test are split into
// N_CTRL1 x N_CTRL2 clusters laid out as N_CTRL1 columns and N_CTRL2 rows.
// Each cluster is a sub-scan-chain with its own shift-in and shift-out pin and
// its own control circuit. Two serially loaded control chains choose which
// sub-chains shift: scan control 1 holds one bit per column, scan control 2
// one bit per row, and a cluster shifts only where a set column bit meets a
// set row bit. Sub-chains whose test data are all don't-care bits are simply
// not selected, so they are skipped: their flip-flops do not toggle, no data
// have to be stored for them and no shift cycles are spent on them.
//
// Cluster numbering is column-major: cluster k is in column k / N_CTRL2 and
// row k % N_CTRL2 (C0..C3 down the first column of a 4x4 array).
//
// Cluster sizes. With UNIFORM_AREA = 0 (uniform scan-cell number approach)
// the sizes follow from SC_NUMBER: every cluster holds
// (SC_NUMBER - SC_NUMBER % C) / C cells and the last one the rest; for the
// default b17 circuit (1415 flip-flops, 4x4 clusters) that is 15 chains of
// 88 and one of 95. With UNIFORM_AREA = 1 (uniform cluster area approach) the
// sizes depend on where the flip-flops were placed and are given in
// AREA_CELLS, which must add up to SC_NUMBER; a cluster may then be empty,
// and its shift-out pin is held at 0. In both cases cell j of cluster k is
// bit (offset of k) + j of func_d/func_q, cell 0 being next to the shift-in.
//
// Operation (all on the rising edge of clk):
//   ctrl_se = 1            control chains shift ctrl1_si / ctrl2_si in;
//                          every sub-chain holds.
//   ctrl_se = 0, scan_se=1 selected sub-chains shift scan_in[k] in and
//                          present their last cell on scan_out[k];
//                          the others hold and their scan input is masked.
//   both 0                 every scan flip-flop captures func_d (capture).
// rst_n clears all flip-flops asynchronously, leaving nothing selected.
//
// The array, the row/column selection and the sizing equations follow the
// document; the pin names, the priority of control load over shift, capture
// in every cluster and the reset are choices of this design. The functional
// logic of the circuit under test is outside this module and connects through
// func_d / func_q.
module twod_scan_top
  import scan_pkg::*;
#(
  parameter int unsigned N_CTRL1      = 4,     // columns: flip-flops in scan control 1
  parameter int unsigned N_CTRL2      = 4,     // rows: flip-flops in scan control 2
  parameter int unsigned SC_NUMBER    = 1415,  // scan flip-flops (b17)
  parameter bit          UNIFORM_AREA = 1'b0,  // 0: uniform scan-cell number, 1: uniform cluster area
  parameter int unsigned AREA_CELLS [N_CTRL1*N_CTRL2] = '{default: 0}
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // control chains
  input  logic                          ctrl_se,
  input  logic                          ctrl1_si,
  input  logic                          ctrl2_si,
  output logic                          ctrl1_so,
  output logic                          ctrl2_so,
  // sub-scan-chains
  input  logic                          scan_se,
  input  logic [N_CTRL1*N_CTRL2-1:0]    scan_in,
  output logic [N_CTRL1*N_CTRL2-1:0]    scan_out,
  output logic [N_CTRL1*N_CTRL2-1:0]    cluster_selected,
  // circuit under test
  input  logic [SC_NUMBER-1:0]          func_d,
  output logic [SC_NUMBER-1:0]          func_q
);

  localparam int unsigned N_CLUSTERS = N_CTRL1 * N_CTRL2;

  // Offset of cluster k in the flat cell vector, uniform cluster area case.
  function automatic int unsigned area_offset(input int unsigned k);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < k; i++) sum += AREA_CELLS[i];
    return sum;
  endfunction

  function automatic int unsigned cluster_len(input int unsigned k);
    return UNIFORM_AREA ? AREA_CELLS[k] : uniform_cells(SC_NUMBER, N_CLUSTERS, k);
  endfunction

  function automatic int unsigned cluster_offset(input int unsigned k);
    return UNIFORM_AREA ? area_offset(k) : uniform_offset(SC_NUMBER, N_CLUSTERS, k);
  endfunction

  if (cluster_offset(N_CLUSTERS - 1) + cluster_len(N_CLUSTERS - 1) != SC_NUMBER) begin : g_size_error
    $error("twod_scan_top: cluster sizes do not add up to SC_NUMBER");
  end

  logic [N_CTRL1-1:0] col_sel;
  logic [N_CTRL2-1:0] row_sel;

  scan_ctrl_chain #(.N(N_CTRL1)) u_scan_ctrl1 (
    .clk   (clk),
    .rst_n (rst_n),
    .se    (ctrl_se),
    .si    (ctrl1_si),
    .sel   (col_sel),
    .so    (ctrl1_so)
  );

  scan_ctrl_chain #(.N(N_CTRL2)) u_scan_ctrl2 (
    .clk   (clk),
    .rst_n (rst_n),
    .se    (ctrl_se),
    .si    (ctrl2_si),
    .sel   (row_sel),
    .so    (ctrl2_so)
  );

  for (genvar k = 0; k < N_CLUSTERS; k++) begin : g_cluster
    localparam int unsigned LEN = cluster_len(k);
    localparam int unsigned OFF = cluster_offset(k);
    localparam int unsigned COL = k / N_CTRL2;
    localparam int unsigned ROW = k % N_CTRL2;

    if (LEN > 0) begin : g_cells
      scan_cluster #(.LEN(LEN)) u_cluster (
        .clk      (clk),
        .rst_n    (rst_n),
        .col_sel  (col_sel[COL]),
        .row_sel  (row_sel[ROW]),
        .ctrl_se  (ctrl_se),
        .scan_se  (scan_se),
        .scan_in  (scan_in[k]),
        .scan_out (scan_out[k]),
        .selected (cluster_selected[k]),
        .func_d   (func_d[OFF +: LEN]),
        .func_q   (func_q[OFF +: LEN])
      );
    end else begin : g_empty
      // A cluster with no scan flip-flop (possible only with UNIFORM_AREA).
      assign scan_out[k]         = 1'b0;
      assign cluster_selected[k] = col_sel[COL] & row_sel[ROW];
    end
  end

endmodule
