// table8_schemes_tb: the multiplexing configurations for k = 4 - 4 physical
// stages with two logical stages each and 2 physical stages with four each -
// under mirroring / double mirroring, serial reuse and full loops, run end to
// end on synthetic routing tables. The engines are built with KMAX = 8
// (4 physical stages, m = 12) and KMAX = 16 (2 physical stages, m = 8), the
// smaller pointer widths keeping the simulated memories small; both run
// k = 4. Each configuration is checked by mux_schedule_runner.
module table8_schemes_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic done4, done2;
  int c4, f4, c2, f2;

  mux_schedule_runner #(.KMAX(8),  .M(12), .NPREFIX(150)) u_p4 (
    .clk, .rst_n, .done(done4), .checks(c4), .failures(f4));
  mux_schedule_runner #(.KMAX(16), .M(8),  .NPREFIX(40))  u_p2 (
    .clk, .rst_n, .done(done2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done4 && done2);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c2, f4 + f2);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c2, f4 + f2 + 1);
    $finish;
  end
endmodule
