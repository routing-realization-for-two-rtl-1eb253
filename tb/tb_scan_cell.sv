// tb_scan_cell: self-checking testbench of the mux-D scan flip-flop.
// Drives random enable, shift select, functional and scan inputs and checks
// the output each cycle against a one-line reference model; also checks the
// asynchronous reset.
module tb_scan_cell;
  logic clk = 1'b0, rst_n;
  logic en, se, d, si, q;
  logic ref_q;
  int checks = 0, failures = 0;

  scan_cell dut (.clk, .rst_n, .en, .se, .d, .si, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; se = 0; d = 0; si = 0;
    rst_n = 1'b0;
    #12;
    checks++; if (q !== 1'b0) begin failures++; $display("reset: q=%b", q); end
    rst_n = 1'b1;
    ref_q = 1'b0;
    repeat (1000) begin
      @(negedge clk);
      en = 1'($urandom); se = 1'($urandom); d = 1'($urandom); si = 1'($urandom);
      if (en) ref_q = se ? si : d;
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("mismatch en=%b se=%b d=%b si=%b q=%b exp=%b", en, se, d, si, q, ref_q);
      end
    end
    // asynchronous reset in mid-cycle
    @(negedge clk); en = 1'b1; se = 1'b1; si = 1'b1;
    @(posedge clk); #1;
    #2 rst_n = 1'b0; #1;
    checks++; if (q !== 1'b0) begin failures++; $display("async reset failed"); end
    rst_n = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
