// tb_rbn_workloads: runs networks shaped like every classification task the
// design was evaluated on, and the five (D, N) configurations of the energy
// study (thirty random samples each), through the RBN engine. One engine of the default size (N = 500,
// D = 100) runs every shape that fits it, zero-padded; a second engine built
// with D = 503, N = 110 runs the one task with more than 100 features.
// Both are driven by rbn_workload_runner, which checks y and the number of
// enabled multiplications in Complete and Approximate mode.
module tb_rbn_workloads;

  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;

  rbn_workload_runner #(.N(500), .D(100), .MIN_D(0))   u_default (
    .done(done_a), .checks(checks_a), .failures(failures_a));
  rbn_workload_runner #(.N(110), .D(503), .MIN_D(100)) u_wide (
    .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #1s;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end

endmodule
