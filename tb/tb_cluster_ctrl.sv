// tb_cluster_ctrl: exhaustive check of the cluster control circuit.
// Every combination of the column bit, row bit, both shift enables and the
// shift-in pin is applied and the outputs are compared with the truth table of
// the selection rule: shift only where a column and a row select meet, hold
// during control load, capture everywhere otherwise, mask shift-in when not
// selected.
module tb_cluster_ctrl;
  logic col_sel, row_sel, ctrl_se, scan_se, si;
  logic chain_en, chain_se, si_masked, selected;
  logic e_sel, e_en, e_se, e_si;
  int checks = 0, failures = 0;

  cluster_ctrl dut (.col_sel, .row_sel, .ctrl_se, .scan_se, .si,
                    .chain_en, .chain_se, .si_masked, .selected);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {col_sel, row_sel, ctrl_se, scan_se, si} = 5'(v);
      #1;
      e_sel = col_sel && row_sel;
      if (ctrl_se)      begin e_en = 1'b0;  e_se = 1'b0; end
      else if (scan_se) begin e_en = e_sel; e_se = 1'b1; end
      else              begin e_en = 1'b1;  e_se = 1'b0; end
      e_si = si && e_sel;
      checks++;
      if (selected !== e_sel || chain_en !== e_en || chain_se !== e_se || si_masked !== e_si) begin
        failures++;
        $display("v=%05b sel=%b en=%b se=%b si_m=%b exp %b %b %b %b", v, selected,
                 chain_en, chain_se, si_masked, e_sel, e_en, e_se, e_si);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
