// tb_scan_cluster: self-checking testbench of one cluster (control circuit and
// sub-scan-chain, default length 88). Random column/row selects, shift enables,
// shift-in and functional data are applied; a model of the cluster predicts
// the shift-out pin and every cell each cycle. The run must include shifts
// while selected, skipped shifts while unselected, holds during control load
// and captures.
module tb_scan_cluster;
  localparam int LEN = 88;
  logic clk = 1'b0, rst_n;
  logic col_sel, row_sel, ctrl_se, scan_se, scan_in, scan_out, selected;
  logic [LEN-1:0] func_d, func_q, model;
  int checks = 0, failures = 0;
  int n_shift = 0, n_skip = 0, n_ctrl = 0, n_capture = 0;

  scan_cluster dut (.clk, .rst_n, .col_sel, .row_sel, .ctrl_se, .scan_se, .scan_in,
                    .scan_out, .selected, .func_d, .func_q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col_sel = 0; row_sel = 0; ctrl_se = 0; scan_se = 0; scan_in = 0; func_d = '0; model = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (4000) begin
      @(negedge clk);
      // mostly shift cycles, some captures and control loads
      col_sel = ($urandom % 4) != 0;
      row_sel = ($urandom % 4) != 0;
      ctrl_se = ($urandom % 8) == 0;
      scan_se = ($urandom % 8) != 0;
      scan_in = 1'($urandom);
      for (int i = 0; i < LEN; i++) func_d[i] = 1'($urandom);
      #1;
      checks++;
      if (selected !== (col_sel & row_sel) || scan_out !== model[LEN-1]) begin
        failures++; $display("selected=%b scan_out=%b exp %b", selected, scan_out, model[LEN-1]);
      end
      if (ctrl_se) n_ctrl++;
      else if (scan_se) begin
        if (col_sel && row_sel) begin
          n_shift++;
          model = {model[LEN-2:0], scan_in};
        end else n_skip++;
      end else begin
        n_capture++;
        model = func_d;
      end
      @(posedge clk); #1;
      checks++;
      if (func_q !== model) begin failures++; $display("cells differ from model"); end
    end
    checks++;
    if (n_shift == 0 || n_skip == 0 || n_ctrl == 0 || n_capture == 0) begin
      failures++;
      $display("mode not exercised: shift=%0d skip=%0d ctrl=%0d capture=%0d",
               n_shift, n_skip, n_ctrl, n_capture);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
