// scan_pkg: types and constant functions shared by the two-dimensional scan
// shift control design.
//
// The sizing functions implement the uniform scan-cell number clustering:
// with SC scan flip-flops and C clusters, x = SC % C cells are left over,
// every cluster but the last holds (SC - x) / C cells and the last cluster
// holds SC - (C - 1) * ((SC - x) / C) cells, i.e. the common size plus the
// remainder. Clusters are numbered column by column (cluster k sits in
// column k / ROWS and row k % ROWS), so the last cluster is the bottom-right
// one.
//
// The operating modes decoded from the two shift-enable pins are named by
// scan_op_t: control-chain load has priority over sub-chain shift; with
// neither enable high every scan flip-flop captures its functional input.
package scan_pkg;

  typedef enum logic [1:0] {
    OP_CAPTURE   = 2'd0,  // all sub-chains capture functional data
    OP_SHIFT     = 2'd1,  // selected sub-chains shift, the rest hold
    OP_CTRL_LOAD = 2'd2   // control chains shift, all sub-chains hold
  } scan_op_t;

  // Decode the two shift enables into an operating mode.
  function automatic scan_op_t decode_op(input logic ctrl_se, input logic scan_se);
    if (ctrl_se)      return OP_CTRL_LOAD;
    else if (scan_se) return OP_SHIFT;
    else              return OP_CAPTURE;
  endfunction

  // Equations (1) and (2): common sub-chain length.
  function automatic int unsigned common_cells(input int unsigned sc_number,
                                               input int unsigned cluster_number);
    int unsigned x;
    x = sc_number % cluster_number;
    return (sc_number - x) / cluster_number;
  endfunction

  // Equation (3): length of the last sub-chain.
  function automatic int unsigned last_cells(input int unsigned sc_number,
                                             input int unsigned cluster_number);
    return sc_number - (cluster_number - 1) * common_cells(sc_number, cluster_number);
  endfunction

  // Length of sub-chain k under the uniform scan-cell number approach.
  function automatic int unsigned uniform_cells(input int unsigned sc_number,
                                                input int unsigned cluster_number,
                                                input int unsigned k);
    if (k == cluster_number - 1) return last_cells(sc_number, cluster_number);
    else                         return common_cells(sc_number, cluster_number);
  endfunction

  // Index of the first scan flip-flop of sub-chain k in the flat cell vector
  // under the uniform scan-cell number approach.
  function automatic int unsigned uniform_offset(input int unsigned sc_number,
                                                 input int unsigned cluster_number,
                                                 input int unsigned k);
    return k * common_cells(sc_number, cluster_number);
  endfunction

endpackage
