// tb_sub_scan_chain: self-checking testbench of one sub-scan-chain at its
// default length (88 cells). Shifts random patterns in, checks that the first
// bit reaches the shift-out after exactly LEN shifts, checks hold with the
// enable low and a parallel capture, comparing all cells with a model each
// cycle.
module tb_sub_scan_chain;
  localparam int LEN = 88;
  logic clk = 1'b0, rst_n;
  logic en, se, si, so;
  logic [LEN-1:0] d, q, model;
  int checks = 0, failures = 0;

  sub_scan_chain dut (.clk, .rst_n, .en, .se, .si, .d, .q, .so);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic en_v, input logic se_v, input logic si_v,
                       input logic [LEN-1:0] d_v);
    @(negedge clk);
    en = en_v; se = se_v; si = si_v; d = d_v;
    #1;
    checks++;
    if (so !== model[LEN-1]) begin failures++; $display("so=%b exp=%b", so, model[LEN-1]); end
    if (en_v) begin
      if (se_v) begin
        for (int i = LEN - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = si_v;
      end else model = d_v;
    end
    @(posedge clk); #1;
    checks++;
    if (q !== model) begin failures++; $display("cells differ from model"); end
  endtask

  function automatic logic [LEN-1:0] rand_word();
    logic [LEN-1:0] w;
    for (int i = 0; i < LEN; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  initial begin
    en = 0; se = 0; si = 0; d = '0; model = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: a 1 shifted into an all-zero chain appears at so after LEN shifts
    cycle(1'b1, 1'b1, 1'b1, rand_word());
    for (int t = 1; t < LEN; t++) begin
      cycle(1'b1, 1'b1, 1'b0, rand_word());
      // t+1 shifts done: the bit sits in cell t
      checks++;
      if (so !== (t == LEN - 1)) begin failures++; $display("so wrong after %0d shifts", t + 1); end
    end
    checks++;
    if (so !== 1'b1) begin failures++; $display("first bit not out after %0d shifts", LEN); end
    repeat (2000) cycle(1'($urandom), 1'($urandom), 1'($urandom), rand_word());
    // hold: enable low for many cycles with changing inputs
    repeat (50) cycle(1'b0, 1'($urandom), 1'($urandom), rand_word());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
