// tb_ss_workloads: the selector core in the configurations whose size and
// speed are evaluated for it.
//
//  * single sorters (b = 1) of N = 16, 32, 64 and 128 cells: one pair per
//    clock, each bus word of four pairs serialized over four clocks;
//  * 64-cell sorters replicated b = 2, 3 and 4 times: b pairs per clock.
// Each configuration streams 256 bus words, merges, and is checked for rate,
// merge time, the selected set and the serial read-out (ss_workload_run).
module tb_ss_workloads;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks, failures;

  localparam int NCFG = 7;
  logic done  [NCFG];
  int   c     [NCFG];
  int   f     [NCFG];

  always #5 clk = ~clk;

  ss_workload_run #(.N(16),  .B(1)) u_n16  (.clk, .rst, .done(done[0]), .checks(c[0]), .failures(f[0]));
  ss_workload_run #(.N(32),  .B(1)) u_n32  (.clk, .rst, .done(done[1]), .checks(c[1]), .failures(f[1]));
  ss_workload_run #(.N(64),  .B(1)) u_n64  (.clk, .rst, .done(done[2]), .checks(c[2]), .failures(f[2]));
  ss_workload_run #(.N(128), .B(1)) u_n128 (.clk, .rst, .done(done[3]), .checks(c[3]), .failures(f[3]));
  ss_workload_run #(.N(64),  .B(2)) u_x2   (.clk, .rst, .done(done[4]), .checks(c[4]), .failures(f[4]));
  ss_workload_run #(.N(64),  .B(3)) u_x3   (.clk, .rst, .done(done[5]), .checks(c[5]), .failures(f[5]));
  ss_workload_run #(.N(64),  .B(4)) u_x4   (.clk, .rst, .done(done[6]), .checks(c[6]), .failures(f[6]));

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("watchdog expired");
    foreach (done[i]) if (!done[i]) $display("configuration %0d did not finish", i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
