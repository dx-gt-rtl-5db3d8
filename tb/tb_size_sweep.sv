// tb_size_sweep -- runs the Mx1 switch and the SoCDMMU at the sizes over which their
// cost is usually charted: switches for 2, 4, 8 and 12 PEs, and SoCDMMUs for
// 2 PEs / 128 G_blocks, 4 / 256, 8 / 512 and 12 / 1024 (16 MB of global memory in
// every case, so G_blocks of 128, 64, 32 and 16 KB).  Each size has its own
// self-checking harness (mx1_sweep_point, socdmmu_sweep_point), all on one clock;
// this module waits for all of them and adds up their checks and failures.
module tb_size_sweep;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int K = 8;
  logic [K-1:0] done;
  int checks [K];
  int failures [K];

  mx1_sweep_point #(.M(2))  u_sw2  (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  mx1_sweep_point #(.M(4))  u_sw4  (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  mx1_sweep_point #(.M(8))  u_sw8  (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  mx1_sweep_point #(.M(12)) u_sw12 (.clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]));

  socdmmu_sweep_point #(.P(2),  .G(128),  .BLK_AW(17)) u_d2  (.clk, .done(done[4]), .checks(checks[4]), .failures(failures[4]));
  socdmmu_sweep_point #(.P(4),  .G(256),  .BLK_AW(16)) u_d4  (.clk, .done(done[5]), .checks(checks[5]), .failures(failures[5]));
  socdmmu_sweep_point #(.P(8),  .G(512),  .BLK_AW(15)) u_d8  (.clk, .done(done[6]), .checks(checks[6]), .failures(failures[6]));
  socdmmu_sweep_point #(.P(12), .G(1024), .BLK_AW(14)) u_d12 (.clk, .done(done[7]), .checks(checks[7]), .failures(failures[7]));

  function automatic int total(int v [K]);
    int s = 0;
    for (int k = 0; k < K; k++) s += v[k];
    return s;
  endfunction

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    wait (done == '1);
    for (int k = 0; k < K; k++)
      $display("point %0d: checks=%0d failures=%0d", k, checks[k], failures[k]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
