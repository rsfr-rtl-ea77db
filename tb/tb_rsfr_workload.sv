// tb_rsfr_workload: the evaluated network sizes and packet counts - 4x4 with
// 125 packets and 8x8 with 500, each first fault-free and then with 10 % of
// its routers faulty. (The 16x16 / 2000-packet case needs only NX=NY=16 and
// NPKT=2000 on a third instance; it is left out because a 256-router mesh
// takes many minutes to compile.) The runs (tb_rsfr_wl_run) proceed in
// parallel, each with its own mesh and clock; this module waits for all of
// them, adds up their checks and prints the result line.
module tb_rsfr_workload;
  bit done [2];
  int c [2], f [2];

  tb_rsfr_wl_run #(.NX(4),  .NY(4),  .NPKT(125))  u_4x4   (.done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_rsfr_wl_run #(.NX(8),  .NY(8),  .NPKT(500))  u_8x8   (.done(done[1]), .checks(c[1]), .failures(f[1]));

  initial begin
    #2000000;
    $display("watchdog: runs not finished (%0b %0b)", done[0], done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1], f[0] + f[1]);
    $finish;
  end
endmodule
