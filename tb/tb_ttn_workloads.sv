// tb_ttn_workloads: runs the three network shapes evaluated for this
// classifier (4, 8 and 16 input features, maximum bond dimension 4) in both
// node styles, each checked end to end against the reference model by
// ttn_workload_run.
module tb_ttn_workloads;
  import ttn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done [6];
  int   c [6], f [6];
  int checks, failures;

  ttn_workload_run #(.N(4),  .ARCH(ARCH_FULL))    r0 (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  ttn_workload_run #(.N(4),  .ARCH(ARCH_PARTIAL)) r1 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  ttn_workload_run #(.N(8),  .ARCH(ARCH_FULL))    r2 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  ttn_workload_run #(.N(8),  .ARCH(ARCH_PARTIAL)) r3 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  ttn_workload_run #(.N(16), .ARCH(ARCH_FULL))    r4 (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));
  ttn_workload_run #(.N(16), .ARCH(ARCH_PARTIAL)) r5 (.clk, .rst_n, .done(done[5]), .checks(c[5]), .failures(f[5]));

  always #2 clk = ~clk;

  function automatic void total();
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin checks += c[i]; failures += f[i]; end
  endfunction

  initial begin
    #4000000;
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
