// tb_neuron_pe -- checks one processing element (four neurons) against the
// reference primitive operation: random inputs, weights, stored records and
// references in both modes, output and inner layer, learning-rate exponents
// j = 0..5, plus directed cases: the 4-point Walsh-Hadamard operation in
// operative mode, an exact weight update, and saturation of large sums.
module tb_neuron_pe;
  import tsu_pkg::*;
  import tsu_ref_pkg::*;

  int checks = 0, failures = 0;

  pe_mode_e          mode;
  logic              out_layer;
  logic [ETA_W-1:0]  eta_j;
  data_t             x [4];
  neuron_t           rec [4];
  data_t             z [4];
  data_t             y [4];
  delta_t            d_own [4];
  weight_t           w_new [4][4];
  delta_t            d_prev [4];

  neuron_pe dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int srand(int range);
    return int'($urandom_range(2 * range)) - range;
  endfunction

  task automatic apply_and_check(string tag);
    int xi[4], wi[16], yo[4], dold[4], zi[4];
    int ye[4], de[4], we[16], pe[4];
    for (int k = 0; k < 4; k++) begin
      xi[k] = int'(x[k]);
      zi[k] = int'(z[k]);
      yo[k] = int'(rec[k].y);
      dold[k] = int'(rec[k].d);
      for (int i = 0; i < 4; i++) wi[k*4+i] = int'(rec[k].w[i]);
    end
    pe_ref(mode == MODE_CORR, out_layer, int'(eta_j), xi, wi, yo, dold, zi, ye, de, we, pe);
    #1;
    for (int k = 0; k < 4; k++) begin
      check(int'(y[k]) == ye[k], $sformatf("%s y[%0d] %0d exp %0d", tag, k, y[k], ye[k]));
      check(int'(d_own[k]) == de[k], $sformatf("%s d_own[%0d] %0d exp %0d", tag, k, d_own[k], de[k]));
      check(int'(d_prev[k]) == pe[k], $sformatf("%s d_prev[%0d] %0d exp %0d", tag, k, d_prev[k], pe[k]));
      for (int i = 0; i < 4; i++)
        check(int'(w_new[k][i]) == we[k*4+i],
              $sformatf("%s w_new[%0d][%0d] %0d exp %0d", tag, k, i, w_new[k][i], we[k*4+i]));
    end
  endtask

  initial begin
    // Directed: Walsh-Hadamard PO, weights +-1.0, exact in fixed point.
    mode = MODE_OPER; out_layer = 0; eta_j = 0;
    x[0] = 16'sd256; x[1] = 16'sd512; x[2] = -16'sd128; x[3] = 16'sd64;  // 1, 2, -0.5, 0.25
    for (int k = 0; k < 4; k++) begin
      z[k] = '0; rec[k].y = '0; rec[k].d = '0;
      for (int i = 0; i < 4; i++)
        rec[k].w[i] = ((($countones(k & i)) % 2) == 1) ? -16'sd16384 : 16'sd16384;
    end
    #1;
    check(y[0] == 16'sd704, "WHT y0 = 1+2-0.5+0.25");
    check(y[1] == -16'sd448, "WHT y1 = 1-2-0.5-0.25");
    check(y[2] == 16'sd832, "WHT y2 = 1+2+0.5-0.25");
    check(y[3] == -16'sd64, "WHT y3 = 1-2+0.5+0.25");
    apply_and_check("wht");

    // Directed: correction of the output layer, eta = 1/2.
    // d0 = z0 - y0 = 1.0 ; w0[1]' = 1.0 + 0.5*1.0*2.0 = 2.0 -> saturates to 32767
    // w0[3]' = 1.0 + 0.5*1.0*0.25 = 1.125 = 18432
    mode = MODE_CORR; out_layer = 1; eta_j = 1;
    rec[0].y = 16'sd256; z[0] = 16'sd512;
    #1;
    check(d_own[0] == 16'sd256, "output error z - y");
    check(w_new[0][3] == 16'sd18432, "weight update w + eta*d*x");
    check(w_new[0][1] == 16'sh7fff, "weight update saturates");
    apply_and_check("corr-directed");

    // Saturation of a large operative sum.
    mode = MODE_OPER;
    for (int i = 0; i < 4; i++) x[i] = 16'sd30000;
    #1;
    check(y[0] == 16'sh7fff, "operative sum saturates");

    // Random
    repeat (3000) begin
      mode = ($urandom_range(1) == 1) ? MODE_CORR : MODE_OPER;
      out_layer = 1'($urandom_range(1));
      eta_j = ETA_W'($urandom_range(5));
      for (int k = 0; k < 4; k++) begin
        x[k] = 16'(srand(($urandom_range(3) == 0) ? 32767 : 2048));
        z[k] = 16'(srand(2048));
        rec[k].y = 16'(srand(2048));
        rec[k].d = 16'(srand(($urandom_range(3) == 0) ? 32767 : 512));
        for (int i = 0; i < 4; i++) rec[k].w[i] = 16'(srand(($urandom_range(3) == 0) ? 32767 : 16384));
      end
      apply_and_check("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
