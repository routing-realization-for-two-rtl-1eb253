// tb_twod_scan_top: end-to-end testbench of the two-dimensional scan shift
// control array at its default size (b17: 1415 scan flip-flops in 4x4
// clusters, 15 sub-chains of 88 and a last one of 95).
//
// The testbench keeps its own model of every scan flip-flop and of both
// control chains, with the cluster sizes worked out here from the clustering
// rule (common size = floor(cells / clusters), last cluster takes the rest).
// Each round loads a column word into scan control 1 and a row word into
// scan control 2, shifts random test data into the sub-chains, sometimes
// captures functional data, and compares every shift-out pin before each edge
// and every flip-flop after it. It counts how often each mechanism occurred:
// control load, shift, a sub-chain skipped during a shift, a masked shift-in,
// capture, a full load of the longest (last) sub-chain with its latency, and
// lower switching activity when fewer clusters are selected. A mechanism that
// never occurs counts as a failure.
module tb_twod_scan_top;
  localparam int COLS = 4;
  localparam int ROWS = 4;
  localparam int NCL  = COLS * ROWS;
  localparam int SC   = 1415;
  localparam int COMMON = SC / NCL;               // 88
  localparam int LAST   = SC - (NCL - 1) * COMMON; // 95

  logic clk = 1'b0, rst_n;
  logic ctrl_se, ctrl1_si, ctrl2_si, ctrl1_so, ctrl2_so;
  logic scan_se;
  logic [NCL-1:0] scan_in, scan_out, cluster_selected;
  logic [SC-1:0]  func_d, func_q;

  twod_scan_top dut (
    .clk, .rst_n, .ctrl_se, .ctrl1_si, .ctrl2_si, .ctrl1_so, .ctrl2_so,
    .scan_se, .scan_in, .scan_out, .cluster_selected, .func_d, .func_q
  );

  // reference model
  logic [SC-1:0]   m_cells;
  logic [COLS-1:0] m_col;
  logic [ROWS-1:0] m_row;

  int checks = 0, failures = 0;
  int n_ctrl = 0, n_shift = 0, n_skip = 0, n_mask = 0, n_capture = 0;
  int n_last_full = 0, n_low_power = 0;
  longint toggles;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int len_of(int k);
    return (k == NCL - 1) ? LAST : COMMON;
  endfunction

  function automatic int off_of(int k);
    return k * COMMON;
  endfunction

  function automatic bit sel_of(int k);
    return m_col[k / ROWS] && m_row[k % ROWS];
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // One clock cycle with the given inputs; model update and checks.
  task automatic cycle(input logic c_se, input logic c1, input logic c2,
                       input logic s_se, input logic [NCL-1:0] s_in,
                       input logic [SC-1:0] f_d);
    logic [SC-1:0] prev_cells;
    @(negedge clk);
    ctrl_se = c_se; ctrl1_si = c1; ctrl2_si = c2;
    scan_se = s_se; scan_in = s_in; func_d = f_d;
    #1;
    // combinational outputs before the edge
    for (int k = 0; k < NCL; k++) begin
      checks++;
      if (scan_out[k] !== m_cells[off_of(k) + len_of(k) - 1]) fail($sformatf("scan_out[%0d]", k));
      if (cluster_selected[k] !== sel_of(k)) fail($sformatf("cluster_selected[%0d]", k));
    end
    checks++;
    if (ctrl1_so !== m_col[COLS-1] || ctrl2_so !== m_row[ROWS-1]) fail("control chain shift-out");
    prev_cells = m_cells;
    if (c_se) begin
      n_ctrl++;
      m_col = {m_col[COLS-2:0], c1};
      m_row = {m_row[ROWS-2:0], c2};
    end else if (s_se) begin
      n_shift++;
      for (int k = 0; k < NCL; k++) begin
        if (sel_of(k)) begin
          for (int j = len_of(k) - 1; j > 0; j--) m_cells[off_of(k) + j] = m_cells[off_of(k) + j - 1];
          m_cells[off_of(k)] = s_in[k];
        end else begin
          n_skip++;
          if (s_in[k]) n_mask++;
        end
      end
    end else begin
      n_capture++;
      m_cells = f_d;
    end
    for (int i = 0; i < SC; i++) if (m_cells[i] != prev_cells[i]) toggles++;
    @(posedge clk); #1;
    checks++;
    if (func_q !== m_cells) fail("scan cells differ from model");
  endtask

  function automatic logic [SC-1:0] rand_cells();
    logic [SC-1:0] w;
    for (int i = 0; i < SC; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  function automatic logic [NCL-1:0] rand_in();
    return NCL'($urandom);
  endfunction

  // Load both control chains: the bit for column/row i goes in last-but-i.
  task automatic load_ctrl(input logic [COLS-1:0] cw, input logic [ROWS-1:0] rw);
    for (int t = 0; t < COLS; t++)
      cycle(1'b1, cw[COLS-1-t], rw[ROWS-1-t], 1'($urandom), rand_in(), rand_cells());
    checks++;
    if (m_col !== cw || m_row !== rw) fail("control load model");
  endtask

  // Shift n cycles of random data and return the number of flip-flop toggles.
  task automatic shift_random(input int n, output longint tg);
    toggles = 0;
    for (int t = 0; t < n; t++) cycle(1'b0, 1'b0, 1'b0, 1'b1, rand_in(), rand_cells());
    tg = toggles;
  endtask

  longint tg_all, tg_one;
  logic [LAST-1:0] pattern;

  initial begin
    ctrl_se = 0; ctrl1_si = 0; ctrl2_si = 0; scan_se = 0; scan_in = '0; func_d = '0;
    m_cells = '0; m_col = '0; m_row = '0; toggles = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (func_q !== '0 || cluster_selected !== '0) fail("reset");
    rst_n = 1'b1;

    // Capture into every cluster, then shift with all clusters selected.
    cycle(1'b0, 1'b0, 1'b0, 1'b0, '0, rand_cells());
    load_ctrl(4'b1111, 4'b1111);
    shift_random(LAST, tg_all);

    // Only one cluster (column 2, row 1) selected: the rest must hold.
    cycle(1'b0, 1'b0, 1'b0, 1'b0, '0, rand_cells());
    load_ctrl(4'b0100, 4'b0010);
    shift_random(LAST, tg_one);
    checks++;
    if (tg_one * 8 < tg_all) n_low_power++;   // about 1/16 of the toggles with 1 of 16 selected
    else fail($sformatf("switching all=%0d one=%0d", tg_all, tg_one));
    $display("flip-flop toggles over %0d shifts: all 16 clusters %0d, one cluster %0d",
             LAST, tg_all, tg_one);

    // Latency of the longest sub-chain: only the last cluster (C15) selected.
    load_ctrl(4'b1000, 4'b1000);
    for (int i = 0; i < LAST; i++) pattern[i] = 1'($urandom);
    for (int t = 0; t < LAST; t++) begin
      logic [NCL-1:0] s;
      s = rand_in();
      s[NCL-1] = pattern[t];
      cycle(1'b0, 1'b0, 1'b0, 1'b1, s, rand_cells());
    end
    // unload: the first bit shifted in must now be on the shift-out pin
    for (int t = 0; t < LAST; t++) begin
      #0;
      checks++;
      if (scan_out[NCL-1] !== pattern[t]) fail($sformatf("unload bit %0d of last chain", t));
      cycle(1'b0, 1'b0, 1'b0, 1'b1, rand_in(), rand_cells());
    end
    n_last_full++;

    // Asymmetric selections and random operation.
    load_ctrl(4'b1010, 4'b0110);
    shift_random(40, tg_one);
    load_ctrl(4'b0000, 4'b1111);
    shift_random(10, tg_one);
    checks++;
    if (tg_one != 0) fail("shift with nothing selected toggled flip-flops");
    repeat (20) begin
      load_ctrl(COLS'($urandom), ROWS'($urandom));
      shift_random(1 + $urandom % 100, tg_one);
      if (($urandom % 2) != 0) cycle(1'b0, 1'b0, 1'b0, 1'b0, rand_in(), rand_cells());
    end

    $display("mechanisms: ctrl_load=%0d shift=%0d skip=%0d masked_in=%0d capture=%0d last_full=%0d low_power=%0d",
             n_ctrl, n_shift, n_skip, n_mask, n_capture, n_last_full, n_low_power);
    checks++;
    if (n_ctrl == 0 || n_shift == 0 || n_skip == 0 || n_mask == 0 || n_capture == 0 ||
        n_last_full == 0 || n_low_power == 0) fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
