// tb_scan_ctrl_chain: self-checking testbench of a scan control chain at its
// default length (4 flip-flops, as in the 4x4 example array).
// Loads chosen select words by shifting N bits in, checks that the select
// outputs equal the intended word after exactly N shifts, that the chain holds
// with its enable low, and that the serial output follows a bit-level model.
module tb_scan_ctrl_chain;
  localparam int N = 4;
  logic clk = 1'b0, rst_n;
  logic se, si, so;
  logic [N-1:0] sel;
  logic [N-1:0] model;
  int checks = 0, failures = 0;

  scan_ctrl_chain dut (.clk, .rst_n, .se, .si, .sel, .so);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(input logic se_v, input logic si_v);
    @(negedge clk);
    se = se_v; si = si_v;
    if (se_v) begin
      for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
      model[0] = si_v;
    end
    @(posedge clk); #1;
    checks++;
    if (sel !== model || so !== model[N-1]) begin
      failures++;
      $display("mismatch sel=%b exp=%b so=%b", sel, model, so);
    end
  endtask

  // Load word w: the bit for position i is shifted in N-1-i cycles before the end.
  task automatic load(input logic [N-1:0] w);
    for (int t = 0; t < N; t++) cycle(1'b1, w[N-1-t]);
    checks++;
    if (sel !== w) begin failures++; $display("load %b gave %b", w, sel); end
  endtask

  initial begin
    se = 0; si = 0; model = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (sel !== '0) begin failures++; $display("reset failed"); end
    rst_n = 1'b1;
    for (int w = 0; w < (1 << N); w++) begin
      load(N'(w));
      repeat (3) cycle(1'b0, 1'($urandom));   // hold
      checks++;
      if (sel !== N'(w)) begin failures++; $display("hold of %0d lost", w); end
    end
    repeat (500) cycle(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
