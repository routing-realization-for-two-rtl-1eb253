// tb_workloads: runs the circuit sizes and cluster counts of the wire-length
// evaluation on the two-dimensional scan array. Seven benchmark circuits
// (b17 1415, b22 537, s13207 638, s15850 534, s35932 1728, s38417 1636 and
// s38584 1426 scan flip-flops) are each built with 3x3, 5x5, 7x7 and 9x9
// clusters under the uniform scan-cell number rule, plus one 4x4 b17 array
// in uniform-area mode with uneven cluster sizes that include an empty
// cluster. Every configuration is taken through full loads and unloads by a
// wl_runner, which checks each shift-out bit and its latency.
module tb_workloads;
  localparam int N = 29;
  logic clk = 1'b0;
  logic [N-1:0] done;
  int ch [N];
  int fl [N];
  int checks, failures;

  always #5 clk = ~clk;

  wl_runner #(.COLS(3), .ROWS(3), .SC(1415), .NAME("b17")) u_b17_3 (.clk, .done(done[0]), .checks(ch[0]), .failures(fl[0]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(1415), .NAME("b17")) u_b17_5 (.clk, .done(done[1]), .checks(ch[1]), .failures(fl[1]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(1415), .NAME("b17")) u_b17_7 (.clk, .done(done[2]), .checks(ch[2]), .failures(fl[2]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(1415), .NAME("b17")) u_b17_9 (.clk, .done(done[3]), .checks(ch[3]), .failures(fl[3]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(537), .NAME("b22")) u_b22_3 (.clk, .done(done[4]), .checks(ch[4]), .failures(fl[4]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(537), .NAME("b22")) u_b22_5 (.clk, .done(done[5]), .checks(ch[5]), .failures(fl[5]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(537), .NAME("b22")) u_b22_7 (.clk, .done(done[6]), .checks(ch[6]), .failures(fl[6]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(537), .NAME("b22")) u_b22_9 (.clk, .done(done[7]), .checks(ch[7]), .failures(fl[7]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(638), .NAME("s13207")) u_s13207_3 (.clk, .done(done[8]), .checks(ch[8]), .failures(fl[8]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(638), .NAME("s13207")) u_s13207_5 (.clk, .done(done[9]), .checks(ch[9]), .failures(fl[9]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(638), .NAME("s13207")) u_s13207_7 (.clk, .done(done[10]), .checks(ch[10]), .failures(fl[10]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(638), .NAME("s13207")) u_s13207_9 (.clk, .done(done[11]), .checks(ch[11]), .failures(fl[11]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(534), .NAME("s15850")) u_s15850_3 (.clk, .done(done[12]), .checks(ch[12]), .failures(fl[12]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(534), .NAME("s15850")) u_s15850_5 (.clk, .done(done[13]), .checks(ch[13]), .failures(fl[13]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(534), .NAME("s15850")) u_s15850_7 (.clk, .done(done[14]), .checks(ch[14]), .failures(fl[14]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(534), .NAME("s15850")) u_s15850_9 (.clk, .done(done[15]), .checks(ch[15]), .failures(fl[15]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(1728), .NAME("s35932")) u_s35932_3 (.clk, .done(done[16]), .checks(ch[16]), .failures(fl[16]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(1728), .NAME("s35932")) u_s35932_5 (.clk, .done(done[17]), .checks(ch[17]), .failures(fl[17]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(1728), .NAME("s35932")) u_s35932_7 (.clk, .done(done[18]), .checks(ch[18]), .failures(fl[18]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(1728), .NAME("s35932")) u_s35932_9 (.clk, .done(done[19]), .checks(ch[19]), .failures(fl[19]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(1636), .NAME("s38417")) u_s38417_3 (.clk, .done(done[20]), .checks(ch[20]), .failures(fl[20]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(1636), .NAME("s38417")) u_s38417_5 (.clk, .done(done[21]), .checks(ch[21]), .failures(fl[21]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(1636), .NAME("s38417")) u_s38417_7 (.clk, .done(done[22]), .checks(ch[22]), .failures(fl[22]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(1636), .NAME("s38417")) u_s38417_9 (.clk, .done(done[23]), .checks(ch[23]), .failures(fl[23]));
  wl_runner #(.COLS(3), .ROWS(3), .SC(1426), .NAME("s38584")) u_s38584_3 (.clk, .done(done[24]), .checks(ch[24]), .failures(fl[24]));
  wl_runner #(.COLS(5), .ROWS(5), .SC(1426), .NAME("s38584")) u_s38584_5 (.clk, .done(done[25]), .checks(ch[25]), .failures(fl[25]));
  wl_runner #(.COLS(7), .ROWS(7), .SC(1426), .NAME("s38584")) u_s38584_7 (.clk, .done(done[26]), .checks(ch[26]), .failures(fl[26]));
  wl_runner #(.COLS(9), .ROWS(9), .SC(1426), .NAME("s38584")) u_s38584_9 (.clk, .done(done[27]), .checks(ch[27]), .failures(fl[27]));
  wl_runner #(.COLS(4), .ROWS(4), .SC(1415), .AREA(1'b1), .NAME("b17"),
    .AREA_CELLS('{120, 75, 0, 101, 90, 88, 130, 60, 95, 100, 70, 85, 91, 110, 80, 120})) u_b17_area (.clk, .done(done[28]), .checks(ch[28]), .failures(fl[28]));


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
