// tb_tsu_ctrl -- checks the layer sequencer for N = 16 with K = 2 PEs
// (2 steps per layer), with K = 3 (ceil(4/3) = 2 steps per layer) and with
// the default K = N/4 (1 step per layer):
// operative runs visit layers 1..m, training runs then visit m..1 in
// correction mode; every clock's mode, layer, step and write strobes are
// compared with the expected schedule, the run length is checked against
// m*ceil(N/(4K)) (doubled when training), done must pulse exactly once, and a
// start while busy must be ignored.
module tb_tsu_ctrl;
  import tsu_pkg::*;

  localparam int N = 16;
  localparam int M = 3;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1;
  logic start [3], train [3];
  logic busy [3], done [3], out_layer [3], we_y [3], we_corr [3], we_prev_d [3];
  pe_mode_e mode [3];
  logic [3:0] stage [3], step [3];

  tsu_ctrl #(.N(N), .K(2)) dut_k2 (
    .clk, .rst_n, .start(start[0]), .train(train[0]), .busy(busy[0]), .done(done[0]),
    .mode(mode[0]), .stage(stage[0]), .step(step[0]), .out_layer(out_layer[0]),
    .we_y(we_y[0]), .we_corr(we_corr[0]), .we_prev_d(we_prev_d[0]));

  tsu_ctrl #(.N(N)) dut_k4 (
    .clk, .rst_n, .start(start[1]), .train(train[1]), .busy(busy[1]), .done(done[1]),
    .mode(mode[1]), .stage(stage[1]), .step(step[1]), .out_layer(out_layer[1]),
    .we_y(we_y[1]), .we_corr(we_corr[1]), .we_prev_d(we_prev_d[1]));

  tsu_ctrl #(.N(N), .K(3)) dut_k3 (
    .clk, .rst_n, .start(start[2]), .train(train[2]), .busy(busy[2]), .done(done[2]),
    .mode(mode[2]), .stage(stage[2]), .step(step[2]), .out_layer(out_layer[2]),
    .we_y(we_y[2]), .we_corr(we_corr[2]), .we_prev_d(we_prev_d[2]));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(int u, int steps, bit tr, bit poke_start);
    int cyc;
    @(negedge clk);
    start[u] = 1; train[u] = tr;
    @(negedge clk);
    start[u] = 0; train[u] = 0;
    cyc = 0;
    // operative pass
    for (int s = 1; s <= M; s++)
      for (int t = 0; t < steps; t++) begin
        check(busy[u] && mode[u] == MODE_OPER && int'(stage[u]) == s && int'(step[u]) == t &&
              we_y[u] && !we_corr[u] && !we_prev_d[u] && !out_layer[u] && !done[u],
              $sformatf("u%0d oper s=%0d t=%0d", u, s, t));
        if (poke_start) start[u] = 1;   // must be ignored
        cyc++;
        @(negedge clk);
        start[u] = 0;
      end
    if (tr)
      for (int s = M; s >= 1; s--)
        for (int t = 0; t < steps; t++) begin
          check(busy[u] && mode[u] == MODE_CORR && int'(stage[u]) == s && int'(step[u]) == t &&
                !we_y[u] && we_corr[u] && (we_prev_d[u] == (s > 1)) &&
                (out_layer[u] == (s == M)) && !done[u],
                $sformatf("u%0d corr s=%0d t=%0d", u, s, t));
          cyc++;
          @(negedge clk);
        end
    check(cyc == M * steps * (tr ? 2 : 1), "run length");
    check(done[u] && !busy[u], $sformatf("u%0d done after %0d clocks", u, cyc));
    @(negedge clk);
    check(!done[u] && !busy[u], "done is one pulse, back to idle");
  endtask

  initial begin
    for (int u = 0; u < 3; u++) begin
      start[u] = 0; train[u] = 0;
    end
    #1 rst_n = 0;   // falling edge: asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy[0] && !busy[1] && !busy[2] && !done[0] && !done[1] && !done[2], "idle after reset");
    run(0, 2, 0, 0);
    run(0, 2, 1, 0);
    run(0, 2, 1, 1);
    run(1, 1, 0, 0);
    run(1, 1, 1, 0);
    run(1, 1, 0, 1);
    run(2, 2, 1, 0);
    run(2, 2, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
