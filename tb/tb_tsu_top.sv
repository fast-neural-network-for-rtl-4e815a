// tb_tsu_top -- end-to-end test of the transformation synthesis unit at its
// default size (N = 16, K = 4 PEs, 3 layers), driven through the host ports.
//  1. Every PO is loaded with the 4-point Walsh-Hadamard coefficients and the
//     network is run in operative mode: each layer multiplies the signal
//     energy by exactly 4, so sum(y^2) must equal 4^m * sum(x^2); every
//     output is also compared with the reference model.
//  2. The weights are perturbed and the network is trained, one sample per
//     iteration, toward the Walsh-Hadamard-type transform of step 1 as the
//     reference (it synthesizes that transform from a wrong one). After every
//     iteration all 48 neuron records (weights, y, delta) must equal the
//     reference model's, and the output error must fall.
// Run lengths are checked against m*N/(4K) clocks (twice that for training).
// Counted mechanisms, each of which must occur, all seen at the ports:
// operative-mode layer steps, correction-mode steps, output-layer errors
// (z - y), errors sent back to an inner layer, weight corrections,
// evaluation-only runs, training runs, and two learning rates 2^-j.
module tb_tsu_top;
  import tsu_pkg::*;
  import tsu_ref_pkg::*;

  localparam int N = 16;
  localparam int K = N / 4;
  localparam int M = 3;
  localparam int STEPS = N / (4 * K);
  localparam int ITERS = 150;

  int checks = 0, failures = 0;

  logic            clk = 0, rst_n = 1;
  logic            start = 0, train = 0;
  logic [ETA_W-1:0] eta_j = '0;
  logic            busy, done;
  logic            smp_we = 0, smp_ref = 0;
  logic [3:0]      smp_addr = '0;
  data_t           smp_data = '0;
  logic [3:0]      h_layer = 4'd1, h_line = '0;
  logic            h_we_w = 0;
  logic [1:0]      h_widx = '0;
  weight_t         h_wd = '0;
  neuron_t         h_rd;

  tsu_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, all observed at the ports: busy clocks of
  // evaluation runs (operative steps) and the extra busy clocks of training
  // runs (correction steps); non-zero output-layer errors and inner-layer
  // errors read back after training; weights changed by a training run.
  int n_oper_steps = 0, n_corr_steps = 0, n_out_err = 0, n_back_err = 0;
  int n_wupd = 0, n_eval_runs = 0, n_train_runs = 0;
  bit eta_seen [16];
  int busy_clocks = 0;

  always @(posedge clk) if (busy) busy_clocks++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  tsu_model mdl;
  tsu_model hmd;   // fixed Walsh-Hadamard network that makes the references

  task automatic write_weight(int l, int q, int i, int v);
    @(negedge clk);
    h_layer = 4'(l); h_line = 4'(q); h_widx = 2'(i); h_wd = 16'(v); h_we_w = 1;
    @(negedge clk);
    h_we_w = 0;
  endtask

  task automatic write_sample(bit is_ref, int a, int v);
    @(negedge clk);
    smp_we = 1; smp_ref = is_ref; smp_addr = 4'(a); smp_data = 16'(v);
    @(negedge clk);
    smp_we = 0;
  endtask

  task automatic run(bit tr, int j);
    int cyc;
    @(negedge clk);
    start = 1; train = tr; eta_j = ETA_W'(j);
    busy_clocks = 0;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 1000) break;
    end
    check(cyc == M * STEPS * (tr ? 2 : 1) + 1,
          $sformatf("run length %0d clocks to done", cyc));
    check(busy_clocks == M * STEPS * (tr ? 2 : 1), $sformatf("busy for %0d clocks", busy_clocks));
    n_oper_steps += M * STEPS;
    if (tr) begin
      n_train_runs++;
      n_corr_steps += busy_clocks - M * STEPS;
      eta_seen[j] = 1;
    end else n_eval_runs++;
  endtask

  task automatic compare_all(string tag);
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++) begin
        h_layer = 4'(l); h_line = 4'(q);
        #1;
        for (int i = 0; i < 4; i++)
          check(int'(h_rd.w[i]) == mdl.w[mdl.idx(l, q)*4 + i],
                $sformatf("%s w l=%0d q=%0d i=%0d: %0d exp %0d", tag, l, q, i,
                          h_rd.w[i], mdl.w[mdl.idx(l, q)*4 + i]));
        check(int'(h_rd.y) == mdl.y[mdl.idx(l, q)],
              $sformatf("%s y l=%0d q=%0d: %0d exp %0d", tag, l, q, h_rd.y, mdl.y[mdl.idx(l, q)]));
        if (n_train_runs > 0 && h_rd.d != 0) begin
          if (l == M) n_out_err++;
          else n_back_err++;
        end
        if (n_train_runs > 0)
          check(int'(h_rd.d) == mdl.d[mdl.idx(l, q)],
                $sformatf("%s d l=%0d q=%0d: %0d exp %0d", tag, l, q, h_rd.d, mdl.d[mdl.idx(l, q)]));
      end
  endtask

  function automatic int hw(int k, int i);
    return (($countones(k & i) % 2) == 1) ? -16384 : 16384;
  endfunction

  initial begin
    int x[], z[];
    longint ex, ey, e_first, e_last, e;
    mdl = new(N);
    hmd = new(N);
    x = new[N];
    z = new[N];
    #1 rst_n = 0;   // falling edge: asynchronous reset
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1. Walsh-Hadamard network, operative mode ----
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++) begin
        // neuron at line q is output k of its PO: find k
        int k;
        k = 0;
        for (int p = 0; p < N / 4; p++)
          for (int n = 0; n < 4; n++)
            if (line_of(l, p, n) == q) k = n;
        for (int i = 0; i < 4; i++) begin
          write_weight(l, q, i, hw(k, i));
          mdl.w[mdl.idx(l, q)*4 + i] = hw(k, i);
          hmd.w[hmd.idx(l, q)*4 + i] = hw(k, i);
        end
      end
    for (int rep = 0; rep < 4; rep++) begin
      ex = 0;
      for (int q = 0; q < N; q++) begin
        x[q] = int'($urandom_range(128)) - 64;    // |x| <= 0.25
        ex += longint'(x[q]) * x[q];
        write_sample(0, q, x[q]);
      end
      run(0, 0);
      mdl.run_oper(x);
      ey = 0;
      for (int q = 0; q < N; q++) begin
        h_layer = 4'(M); h_line = 4'(q);
        #1 ey += longint'(h_rd.y) * h_rd.y;
      end
      check(ey == 64 * ex, $sformatf("energy gain 4^m: %0d vs 64*%0d", ey, ex));
      compare_all("wht");
    end

    // ---- 2. training from perturbed weights toward the WHT network ----
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++)
        for (int i = 0; i < 4; i++) begin
          int v;
          v = mdl.w[mdl.idx(l, q)*4 + i] + int'($urandom_range(6000)) - 3000;
          write_weight(l, q, i, v);
          mdl.w[mdl.idx(l, q)*4 + i] = v;
        end
    e_first = 0;
    e_last = 0;
    for (int it = 0; it < ITERS; it++) begin
      int j;
      for (int q = 0; q < N; q++) begin
        x[q] = int'($urandom_range(128)) - 64;
        write_sample(0, q, x[q]);
      end
      hmd.run_oper(x);
      for (int q = 0; q < N; q++) begin
        z[q] = hmd.y[hmd.idx(M, q)];
        write_sample(1, q, z[q]);
      end
      j = (it < ITERS / 2) ? 4 : 5;
      run(1, j);
      mdl.run_oper(x);
      e = mdl.out_err(z);
      begin
        int wbefore[];
        wbefore = mdl.w;
        mdl.run_corr(x, z, j);
        foreach (wbefore[i]) if (wbefore[i] != mdl.w[i]) n_wupd++;
      end
      if (it < 10) e_first += e;
      if (it >= ITERS - 10) e_last += e;
      compare_all($sformatf("train it=%0d", it));
    end
    $display("squared output error, first 10 iterations %0d, last 10 %0d", e_first, e_last);
    check(e_last * 4 < e_first, "training reduces the output error at least fourfold");

    // evaluation run after training still matches the model
    run(0, 0);
    mdl.run_oper(x);
    compare_all("after training");

    $display("mechanisms: oper_steps=%0d corr_steps=%0d out_err=%0d back_err=%0d weight_updates=%0d eval_runs=%0d train_runs=%0d eta4=%0d eta5=%0d",
             n_oper_steps, n_corr_steps, n_out_err, n_back_err, n_wupd, n_eval_runs, n_train_runs,
             eta_seen[4], eta_seen[5]);
    check(n_wupd > 0, "weight correction happened");
    check(n_oper_steps > 0, "operative mode happened");
    check(n_corr_steps > 0, "correction mode happened");
    check(n_out_err > 0, "output-layer error happened");
    check(n_back_err > 0, "error back-propagation happened");
    check(n_eval_runs > 0, "evaluation run happened");
    check(n_train_runs > 0, "training run happened");
    check(eta_seen[4] && eta_seen[5], "two learning rates used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
