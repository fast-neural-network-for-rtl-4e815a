// tsu_ref_pkg -- reference model used by the testbenches of the
// transformation synthesis unit. It computes, in plain integer arithmetic
// over flat arrays, what the network should produce:
//   line_of  : the four data lines of PO p in stage s (written with integer
//              division and remainder rather than bit masks)
//   pe_ref   : one primitive operation (four neurons), both modes
//   tsu_model: the whole network, one operative pass and one training pass
// Fixed-point rules: Q2.14 weights, Q8.8 data and errors, round half up at
// every right shift, saturate to 16 bits.
package tsu_ref_pkg;

  function automatic longint rnd(longint v, int sh);
    if (sh == 0) return v;
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic int sat(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int line_of(int s, int p, int n);
    int S, L, per, b, q, base;
    S = 1 << (s + 1);
    L = S / 2;
    per = S / 4;
    b = p / per;
    q = p % per;
    base = b * S;
    if (q == 0) begin
      case (n)
        0: return base;
        1: return base + L / 2;
        2: return base + L;
        default: return base + L + L / 2;
      endcase
    end
    case (n)
      0: return base + q;
      1: return base + L - q;
      2: return base + L + q;
      default: return base + S - q;
    endcase
  endfunction

  // One PO. w[k*4+i] = weight i of neuron k.
  function automatic void pe_ref(input bit corr, input bit out_layer, input int j,
                        input int x[4], input int w[16], input int y_old[4],
                        input int d_old[4], input int z[4],
                        output int y[4], output int d_own[4],
                        output int w_new[16], output int d_prev[4]);
    longint acc;
    for (int k = 0; k < 4; k++) begin
      acc = 0;
      for (int i = 0; i < 4; i++) acc += longint'(x[i]) * w[k*4+i];
      y[k] = sat(rnd(acc, 14));
      d_own[k] = out_layer ? sat(longint'(z[k]) - longint'(y_old[k])) : d_old[k];
    end
    for (int i = 0; i < 4; i++) begin
      acc = 0;
      for (int k = 0; k < 4; k++) acc += longint'(d_own[k]) * w[k*4+i];
      d_prev[i] = sat(rnd(acc, 14));
    end
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 4; i++)
        w_new[k*4+i] = sat(longint'(w[k*4+i]) +
                           rnd(longint'(d_own[k]) * x[i], 2 + j));
    if (!corr) begin
      for (int k = 0; k < 4; k++) begin
        d_own[k] = 0;
        d_prev[k] = 0;
      end
      for (int i = 0; i < 16; i++) w_new[i] = w[i];
    end
  endfunction

  class tsu_model;
    int n, m;
    int w[];   // [((l-1)*n + q)*4 + i]
    int y[];   // [(l-1)*n + q]
    int d[];

    function new(int n_pts);
      n = n_pts;
      m = $clog2(n_pts) - 1;
      w = new[n * m * 4];
      y = new[n * m];
      d = new[n * m];
      foreach (y[i]) begin
        y[i] = 0;
        d[i] = 0;
      end
      foreach (w[i]) w[i] = 0;
    endfunction

    function int idx(int l, int q);
      return (l - 1) * n + q;
    endfunction

    // Inputs of PO p of layer s (x for layer 1, y of layer s-1 otherwise).
    function void po_in(int s, int p, int x[], output int a[4]);
      for (int i = 0; i < 4; i++)
        a[i] = (s == 1) ? x[line_of(s, p, i)] : y[idx(s - 1, line_of(s, p, i))];
    endfunction

    function void run_oper(int x[]);
      int a[4], wl[16], yo[4], dd[4], zz[4], yn[4], dn[4], wn[16], dp[4];
      for (int s = 1; s <= m; s++)
        for (int p = 0; p < n / 4; p++) begin
          po_in(s, p, x, a);
          for (int k = 0; k < 4; k++) begin
            for (int i = 0; i < 4; i++) wl[k*4+i] = w[idx(s, line_of(s, p, k))*4 + i];
            yo[k] = 0; dd[k] = 0; zz[k] = 0;
          end
          pe_ref(0, 0, 0, a, wl, yo, dd, zz, yn, dn, wn, dp);
          for (int k = 0; k < 4; k++) y[idx(s, line_of(s, p, k))] = yn[k];
        end
    endfunction

    function void run_corr(int x[], int z[], int j);
      int a[4], wl[16], yo[4], dd[4], zz[4], yn[4], dn[4], wn[16], dp[4];
      for (int s = m; s >= 1; s--)
        for (int p = 0; p < n / 4; p++) begin
          po_in(s, p, x, a);
          for (int k = 0; k < 4; k++) begin
            int q;
            q = line_of(s, p, k);
            for (int i = 0; i < 4; i++) wl[k*4+i] = w[idx(s, q)*4 + i];
            yo[k] = y[idx(s, q)];
            dd[k] = d[idx(s, q)];
            zz[k] = z[q];
          end
          pe_ref(1, s == m, j, a, wl, yo, dd, zz, yn, dn, wn, dp);
          for (int k = 0; k < 4; k++) begin
            int q;
            q = line_of(s, p, k);
            for (int i = 0; i < 4; i++) w[idx(s, q)*4 + i] = wn[k*4+i];
            if (s == m) d[idx(s, q)] = dn[k];
            if (s > 1) d[idx(s - 1, line_of(s, p, k))] = dp[k];
          end
        end
    endfunction

    // Squared output error against z, in raw Q8.8 units.
    function longint out_err(int z[]);
      longint e;
      e = 0;
      for (int q = 0; q < n; q++) begin
        longint dq;
        dq = longint'(z[q]) - longint'(y[idx(m, q)]);
        e += dq * dq;
      end
      return e;
    endfunction
  endclass

endpackage
