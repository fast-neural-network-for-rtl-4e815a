// tsu_train_run -- one transform-synthesis run of the synthesis unit at a
// chosen size N with K PEs, driven through the host ports, for testbenches
// that exercise several sizes.
//  1. All POs get the normalized 4-point Walsh-Hadamard coefficients
//     (+-0.5, an orthonormal operation), one sample is run in operative
//     mode and every neuron is compared with the reference model; the output
//     energy must equal the input energy to within the rounding of the
//     m layers.
//  2. The weights are perturbed and the network is trained for ITERS
//     iterations (learning rate 2^-J0, then 2^-J1 for the second half).
//     TARGET = 0: toward that transform, a new random sample each
//     iteration. TARGET = 1: toward a transform that maps one given signal,
//     a sampled cosine, onto a spectrum of prescribed form, a straight line
//     z[q] = a*(q - (N-1)/2). After every iteration all N*m neuron records
//     must equal the model's, and the output error must drop at least
//     fourfold.
// Run lengths are checked against m*ceil(N/(4K)) clocks (twice when training).
// Reports its counts on checks/failures and raises finished at the end.
module tsu_train_run
  import tsu_pkg::*;
  import tsu_ref_pkg::*;
#(
  parameter int N     = 64,
  parameter int K     = 4,
  parameter int ITERS = 80,
  parameter int J0    = 3,
  parameter int J1    = 4,
  parameter int TARGET = 0     // 0: Walsh-Hadamard, 1: prescribed linear spectrum
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int LG    = $clog2(N);
  localparam int M     = LG - 1;
  localparam int STEPS = (N / 4 + K - 1) / K;

  logic             start = 0, train = 0;
  logic [ETA_W-1:0] eta_j = '0;
  logic             busy, done;
  logic             smp_we = 0, smp_ref = 0;
  logic [LG-1:0]    smp_addr = '0;
  data_t            smp_data = '0;
  logic [LG-1:0]    h_layer = LG'(1), h_line = '0;
  logic             h_we_w = 0;
  logic [1:0]       h_widx = '0;
  weight_t          h_wd = '0;
  neuron_t          h_rd;

  tsu_top #(.N(N), .K(K)) dut (.*);

  tsu_model mdl;
  tsu_model hmd;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  task automatic write_weight(int l, int q, int i, int v);
    @(negedge clk);
    h_layer = LG'(l); h_line = LG'(q); h_widx = 2'(i); h_wd = 16'(v); h_we_w = 1;
    @(negedge clk);
    h_we_w = 0;
  endtask

  task automatic write_sample(bit is_ref, int a, int v);
    @(negedge clk);
    smp_we = 1; smp_ref = is_ref; smp_addr = LG'(a); smp_data = 16'(v);
    @(negedge clk);
    smp_we = 0;
  endtask

  task automatic run(bit tr, int j);
    int cyc;
    @(negedge clk);
    start = 1; train = tr; eta_j = ETA_W'(j);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == M * STEPS * (tr ? 2 : 1) + 1, $sformatf("run length %0d", cyc));
  endtask

  task automatic compare_all(string tag);
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++) begin
        h_layer = LG'(l); h_line = LG'(q);
        #1;
        for (int i = 0; i < 4; i++)
          check(int'(h_rd.w[i]) == mdl.w[mdl.idx(l, q)*4 + i],
                $sformatf("%s w l=%0d q=%0d i=%0d", tag, l, q, i));
        check(int'(h_rd.y) == mdl.y[mdl.idx(l, q)], $sformatf("%s y l=%0d q=%0d", tag, l, q));
      end
  endtask

  task automatic compare_delta(string tag);
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++) begin
        h_layer = LG'(l); h_line = LG'(q);
        #1 check(int'(h_rd.d) == mdl.d[mdl.idx(l, q)], $sformatf("%s d l=%0d q=%0d", tag, l, q));
      end
  endtask

  initial begin
    int x[], z[];
    longint ex, ey, e, e_first, e_last;
    checks = 0;
    failures = 0;
    finished = 0;
    mdl = new(N);
    hmd = new(N);
    x = new[N];
    z = new[N];
    @(posedge rst_n);

    // ---- 1. normalized Walsh-Hadamard network ----
    for (int l = 1; l <= M; l++)
      for (int p = 0; p < N / 4; p++)
        for (int k = 0; k < 4; k++)
          for (int i = 0; i < 4; i++) begin
            int v, q;
            q = line_of(l, p, k);
            v = (($countones(k & i) % 2) == 1) ? -8192 : 8192;
            write_weight(l, q, i, v);
            mdl.w[mdl.idx(l, q)*4 + i] = v;
            hmd.w[hmd.idx(l, q)*4 + i] = v;
          end
    ex = 0;
    for (int q = 0; q < N; q++) begin
      x[q] = int'($urandom_range(512)) - 256;
      ex += longint'(x[q]) * x[q];
      write_sample(0, q, x[q]);
    end
    run(0, 0);
    mdl.run_oper(x);
    compare_all("wht");
    ey = 0;
    for (int q = 0; q < N; q++) ey += longint'(mdl.y[mdl.idx(M, q)]) * mdl.y[mdl.idx(M, q)];
    check(ey * 10 > ex * 9 && ey * 10 < ex * 11,
          $sformatf("orthonormal network keeps energy: %0d vs %0d", ey, ex));

    // ---- 2. training toward it from perturbed weights ----
    for (int l = 1; l <= M; l++)
      for (int q = 0; q < N; q++)
        for (int i = 0; i < 4; i++) begin
          int v;
          v = mdl.w[mdl.idx(l, q)*4 + i] + int'($urandom_range(3000)) - 1500;
          write_weight(l, q, i, v);
          mdl.w[mdl.idx(l, q)*4 + i] = v;
        end
    e_first = 0;
    e_last = 0;
    for (int it = 0; it < ITERS; it++) begin
      int j;
      if (TARGET == 0) begin
        for (int q = 0; q < N; q++) begin
          x[q] = int'($urandom_range(512)) - 256;
          write_sample(0, q, x[q]);
        end
        hmd.run_oper(x);
        for (int q = 0; q < N; q++) begin
          z[q] = hmd.y[hmd.idx(M, q)];
          write_sample(1, q, z[q]);
        end
      end else if (it == 0) begin
        // one signal type, one prescribed spectral form, loaded once
        for (int q = 0; q < N; q++) begin
          x[q] = int'(200.0 * $cos(2.0 * 3.14159265358979 * 3.0 * real'(q) / real'(N)));
          z[q] = int'(490.0 / real'(N) * (real'(q) - real'(N - 1) / 2.0));
          write_sample(0, q, x[q]);
          write_sample(1, q, z[q]);
        end
      end
      j = (it < ITERS / 2) ? J0 : J1;
      run(1, j);
      mdl.run_oper(x);
      e = mdl.out_err(z);
      mdl.run_corr(x, z, j);
      if (it < 10) e_first += e;
      if (it >= ITERS - 10) e_last += e;
      compare_all($sformatf("it=%0d", it));
      if (it % 16 == 0) compare_delta($sformatf("it=%0d", it));
    end
    $display("N=%0d K=%0d target=%0d: squared output error, first 10 iterations %0d, last 10 %0d",
             N, K, TARGET, e_first, e_last);
    check(e_last * 4 < e_first, "training reduces the output error at least fourfold");
    finished = 1;
  end
endmodule
