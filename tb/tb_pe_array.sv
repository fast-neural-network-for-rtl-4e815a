// tb_pe_array -- checks the operational unit with K = 2 PEs for N = 16
// (two steps per layer): for every stage and step, each PE must present
// the lines of PO step*K+k and compute that PO's outputs, in both modes,
// from random data gathered by line, as the reference operation does.
module tb_pe_array;
  import tsu_pkg::*;
  import tsu_ref_pkg::*;

  localparam int N = 16;
  localparam int K = 2;

  int checks = 0, failures = 0;

  pe_mode_e          mode;
  logic              out_layer;
  logic [ETA_W-1:0]  eta_j;
  logic [3:0]        stage, step;
  logic              po_valid [K];
  logic [3:0]        line  [K][4];
  data_t             x     [K][4];
  neuron_t           rec   [K][4];
  data_t             z     [K][4];
  data_t             y     [K][4];
  delta_t            d_own [K][4];
  weight_t           w_new [K][4][4];
  delta_t            d_prev[K][4];

  pe_array #(.N(N), .K(K)) dut (.*);

  // Per-line random data; the PE inputs are gathered from it by line.
  int lx[N], lz[N], ly[N], ld[N], lw[N][4];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int it = 0; it < 40; it++) begin
      for (int q = 0; q < N; q++) begin
        lx[q] = int'($urandom_range(4096)) - 2048;
        lz[q] = int'($urandom_range(4096)) - 2048;
        ly[q] = int'($urandom_range(4096)) - 2048;
        ld[q] = int'($urandom_range(1024)) - 512;
        for (int i = 0; i < 4; i++) lw[q][i] = int'($urandom_range(32768)) - 16384;
      end
      mode = it[0] ? MODE_CORR : MODE_OPER;
      out_layer = it[1];
      eta_j = ETA_W'(it % 4);
      for (int s = 1; s <= 3; s++) begin
        for (int t = 0; t < N / (4 * K); t++) begin
          stage = 4'(s);
          step  = 4'(t);
          #1;
          // gather by the lines the array reports
          for (int k = 0; k < K; k++)
            for (int n = 0; n < 4; n++) begin
              x[k][n] = 16'(lx[line[k][n]]);
              z[k][n] = 16'(lz[line[k][n]]);
              rec[k][n].y = 16'(ly[line[k][n]]);
              rec[k][n].d = 16'(ld[line[k][n]]);
              for (int i = 0; i < 4; i++) rec[k][n].w[i] = 16'(lw[line[k][n]][i]);
            end
          #1;
          for (int k = 0; k < K; k++) begin
            int p, xi[4], wi[16], yo[4], dd[4], zi[4], ye[4], de[4], we[16], pe[4], ln;
            p = t * K + k;
            check(po_valid[k], $sformatf("s=%0d t=%0d pe=%0d valid", s, t, k));
            for (int n = 0; n < 4; n++) begin
              ln = line_of(s, p, n);
              check(int'(line[k][n]) == ln, $sformatf("s=%0d t=%0d pe=%0d line %0d", s, t, k, n));
              xi[n] = lx[ln]; zi[n] = lz[ln]; yo[n] = ly[ln]; dd[n] = ld[ln];
              for (int i = 0; i < 4; i++) wi[n*4+i] = lw[ln][i];
            end
            pe_ref(mode == MODE_CORR, out_layer, int'(eta_j), xi, wi, yo, dd, zi, ye, de, we, pe);
            for (int n = 0; n < 4; n++) begin
              check(int'(y[k][n]) == ye[n], $sformatf("y pe=%0d n=%0d", k, n));
              check(int'(d_own[k][n]) == de[n], $sformatf("d_own pe=%0d n=%0d", k, n));
              check(int'(d_prev[k][n]) == pe[n], $sformatf("d_prev pe=%0d n=%0d", k, n));
              for (int i = 0; i < 4; i++)
                check(int'(w_new[k][n][i]) == we[n*4+i], $sformatf("w_new pe=%0d n=%0d i=%0d", k, n, i));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
