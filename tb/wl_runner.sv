// wl_runner: drives one twod_scan_top configuration through a complete test
// load and unload, for the workload testbench.
//
// It first loads every control bit with 1 (all clusters selected), shifts
// random data into every sub-chain for twice the longest chain length and
// checks that each bit leaves its chain's shift-out pin exactly LEN(k) shifts
// after it went in. It then repeats with random column and row words, where
// only selected chains advance. Chain lengths are worked out here from the
// clustering rule, or taken from AREA_CELLS in uniform-area mode. The number
// of shift cycles for one full load (the longest chain) is reported as the
// test time per pattern.
module wl_runner #(
  parameter int unsigned COLS = 4,
  parameter int unsigned ROWS = 4,
  parameter int unsigned SC   = 1415,
  parameter bit          AREA = 1'b0,
  parameter int unsigned AREA_CELLS [COLS*ROWS] = '{default: 0},
  parameter string       NAME = "b17"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned NCL = COLS * ROWS;

  function automatic int unsigned len_of(int unsigned k);
    int unsigned base;
    if (AREA) return AREA_CELLS[k];
    base = SC / NCL;
    return (k == NCL - 1) ? SC - (NCL - 1) * base : base;
  endfunction

  function automatic int unsigned max_len();
    int unsigned m = 0;
    for (int unsigned k = 0; k < NCL; k++) if (len_of(k) > m) m = len_of(k);
    return m;
  endfunction

  logic rst_n, ctrl_se, ctrl1_si, ctrl2_si, ctrl1_so, ctrl2_so, scan_se;
  logic [NCL-1:0] scan_in, scan_out, cluster_selected;
  logic [SC-1:0]  func_d, func_q;

  twod_scan_top #(.N_CTRL1(COLS), .N_CTRL2(ROWS), .SC_NUMBER(SC),
                  .UNIFORM_AREA(AREA), .AREA_CELLS(AREA_CELLS)) dut (
    .clk, .rst_n, .ctrl_se, .ctrl1_si, .ctrl2_si, .ctrl1_so, .ctrl2_so,
    .scan_se, .scan_in, .scan_out, .cluster_selected, .func_d, .func_q
  );

  // per chain: bits in flight, oldest first; chains start at 0 after reset
  bit fifo [NCL][$];
  logic [COLS-1:0] cw;
  logic [ROWS-1:0] rw;

  task automatic load_ctrl(input logic [COLS-1:0] c, input logic [ROWS-1:0] r);
    int unsigned n = (COLS > ROWS) ? COLS : ROWS;
    for (int unsigned t = 0; t < n; t++) begin
      @(negedge clk);
      ctrl_se = 1'b1;
      ctrl1_si = (n - 1 - t < COLS) ? c[n-1-t] : 1'b0;
      ctrl2_si = (n - 1 - t < ROWS) ? r[n-1-t] : 1'b0;
    end
    cw = c; rw = r;   // the shift that follows drops ctrl_se at the next falling edge
  endtask

  task automatic shift(input int unsigned cycles);
    for (int unsigned t = 0; t < cycles; t++) begin
      @(negedge clk);
      ctrl_se = 1'b0;
      scan_se = 1'b1;
      for (int unsigned k = 0; k < NCL; k++) scan_in[k] = 1'($urandom);
      #1;
      for (int unsigned k = 0; k < NCL; k++) begin
        bit exp_out;
        if (len_of(k) == 0) exp_out = 1'b0;
        else if (fifo[k].size() == len_of(k)) exp_out = fifo[k][0];
        else exp_out = 1'b0;
        checks++;
        if (scan_out[k] !== exp_out) begin
          failures++;
          if (failures < 10) $display("%s: chain %0d out=%b exp=%b", NAME, k, scan_out[k], exp_out);
        end
        if (cw[k / ROWS] && rw[k % ROWS] && len_of(k) > 0) begin
          if (fifo[k].size() == len_of(k)) void'(fifo[k].pop_front());
          fifo[k].push_back(scan_in[k]);
        end
      end
    end
    @(negedge clk);
    scan_se = 1'b0;
    ctrl_se = 1'b1;   // park: hold everything
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    ctrl_se = 1'b1; ctrl1_si = 1'b0; ctrl2_si = 1'b0; scan_se = 1'b0;
    scan_in = '0; func_d = '0; cw = '0; rw = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_ctrl('1, '1);
    shift(2 * max_len());
    repeat (4) begin
      load_ctrl(COLS'($urandom), ROWS'($urandom));
      shift(max_len());
    end
    $display("%-8s %0dx%0d clusters %s: longest sub-chain %0d cells, %0d shift cycles per full load (+%0d control load)",
             NAME, COLS, ROWS, AREA ? "uniform area" : "uniform cells", max_len(), max_len(),
             (COLS > ROWS) ? COLS : ROWS);
    done = 1'b1;
  end
endmodule
