// tb_tsu_workload -- transform synthesis at larger sizes: a 64-point
// network with 4 PEs (4 steps per layer) and the 256-point network with 16
// PEs (4 steps per layer, 7 layers, 1792 neurons, 7168 weights). Each is
// loaded with the normalized Walsh-Hadamard transform, checked, then
// trained toward it from perturbed weights (see tsu_train_run). A third
// run, 64 points on 2 PEs (8 steps per layer), synthesizes a transform that
// gives a sampled cosine a linear spectrum. A fourth, 32 points on 3 PEs,
// has a PE count that does not divide the 8 POs of a layer, so the last of
// the 3 steps of each layer leaves one PE idle.
module tb_tsu_workload;
  logic clk = 0, rst_n = 1;
  int   checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  int   checks_d, failures_d;
  logic fin_a, fin_b, fin_c, fin_d;

  always #5 clk = ~clk;

  tsu_train_run #(.N(64), .K(4), .ITERS(80), .J0(3), .J1(4)) run_a (
    .clk, .rst_n, .checks(checks_a), .failures(failures_a), .finished(fin_a));

  tsu_train_run #(.N(256), .K(16), .ITERS(60), .J0(3), .J1(4)) run_b (
    .clk, .rst_n, .checks(checks_b), .failures(failures_b), .finished(fin_b));

  tsu_train_run #(.N(64), .K(2), .ITERS(60), .J0(4), .J1(5), .TARGET(1)) run_c (
    .clk, .rst_n, .checks(checks_c), .failures(failures_c), .finished(fin_c));

  tsu_train_run #(.N(32), .K(3), .ITERS(60), .J0(3), .J1(4)) run_d (
    .clk, .rst_n, .checks(checks_d), .failures(failures_d), .finished(fin_d));

  initial begin
    #1 rst_n = 0;   // falling edge: asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin_a && fin_b && fin_c && fin_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c + checks_d,
             failures_a + failures_b + failures_c + failures_d);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c + checks_d,
             failures_a + failures_b + failures_c + failures_d + 1);
    $finish;
  end
endmodule
