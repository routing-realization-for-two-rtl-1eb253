// tb_workloads_b17_large: runs b17 (1415 scan flip-flops) on the larger
// grids of the wire-length sweep, 11x11, 13x13 and 15x15 clusters, under the
// uniform scan-cell number rule. Each configuration is taken through full
// loads and unloads by a wl_runner, which checks each shift-out bit and its
// latency.
module tb_workloads_b17_large;
  localparam int N = 3;
  logic clk = 1'b0;
  logic [N-1:0] done;
  int ch [N];
  int fl [N];
  int checks, failures;

  always #5 clk = ~clk;

  wl_runner #(.COLS(11), .ROWS(11), .SC(1415), .NAME("b17")) u_b17_11 (.clk, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  wl_runner #(.COLS(13), .ROWS(13), .SC(1415), .NAME("b17")) u_b17_13 (.clk, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  wl_runner #(.COLS(15), .ROWS(15), .SC(1415), .NAME("b17")) u_b17_15 (.clk, .done(done[2]), .checks(ch[2]), .failures(fl[2]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
