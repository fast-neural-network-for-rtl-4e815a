// neuron_pe -- processing element of the synthesis network: four 4-input
// linear neurons that together stand in for one 4-point primitive operation
// (PO) of the U-transformation, b_k = sum_n a_n * V(n,k).
//
// Neuron k owns the weights w_k[0..3] (w_k[n] plays V(n,k)) and sees the same
// four inputs x[0..3] as the other three neurons of the PE.
//
// Operative mode (eq. 2):   y_k = sum_i x_i * w_k[i]
// Correction mode:
//   own error (eq. 3)       d_k = z_k - y_k          (output layer)
//                           d_k = stored delta       (inner layer)
//   error sent back (eq. 4) dprev_i = sum_k d_k * w_k[i]
//                           = the error of the previous-layer neuron that
//                             drives input i
//   weight update (eq. 5)   w_k[i]' = w_k[i] + eta * d_k * x_i
// The learning rate is restricted to eta = 2^-j, so the multiply by eta is an
// arithmetic right shift by j. The error sent back uses the weights from
// before the update (plain back-propagation).
//
// Number formats and rounding come from tsu_pkg (Q2.14 weights, Q8.8 data and
// errors, round to nearest, saturate). The datapath is combinational: the
// storage unit registers the results, so one PE completes one PO per clock.
// The two modes and the per-mode operations follow the method; the parallel,
// single-cycle datapath is this design's choice.
module neuron_pe
  import tsu_pkg::*;
(
  input  pe_mode_e             mode,
  input  logic                 out_layer,  // correction: this is layer m
  input  logic [ETA_W-1:0]     eta_j,      // eta = 2^-eta_j
  input  data_t                x    [4],   // PO inputs (previous layer y)
  input  neuron_t              rec  [4],   // stored records of the 4 neurons
  input  data_t                z    [4],   // reference values (output layer)
  output data_t                y    [4],   // operative: new excitations
  output delta_t               d_own[4],   // correction: errors of own neurons
  output weight_t              w_new[4][4],// correction: updated weights [k][i]
  output delta_t               d_prev[4]   // correction: errors sent back [i]
);

  always_comb begin
    logic signed [47:0] acc;
    logic signed [47:0] upd;

    for (int k = 0; k < 4; k++) begin
      // eq. (2)
      acc = '0;
      for (int i = 0; i < 4; i++)
        acc += 48'(x[i]) * 48'(rec[k].w[i]);
      y[k] = sat16(rshift_rnd(acc, W_FRAC));

      // eq. (3) for the output layer, stored delta otherwise
      if (out_layer) d_own[k] = sat16(48'(z[k]) - 48'(rec[k].y));
      else           d_own[k] = rec[k].d;
    end

    for (int i = 0; i < 4; i++) begin
      // eq. (4)
      acc = '0;
      for (int k = 0; k < 4; k++)
        acc += 48'(d_own[k]) * 48'(rec[k].w[i]);
      d_prev[i] = sat16(rshift_rnd(acc, W_FRAC));
    end

    for (int k = 0; k < 4; k++) begin
      for (int i = 0; i < 4; i++) begin
        // eq. (5), eta = 2^-j as a shift
        upd = rshift_rnd(48'(d_own[k]) * 48'(x[i]), DW_SHIFT + int'(eta_j));
        w_new[k][i] = sat16(48'(rec[k].w[i]) + upd);
      end
    end

    // Outputs of the mode not selected are don't-care; keep them quiet.
    if (mode == MODE_OPER) begin
      for (int k = 0; k < 4; k++) begin
        d_own[k]  = '0;
        d_prev[k] = '0;
        for (int i = 0; i < 4; i++) w_new[k][i] = rec[k].w[i];
      end
    end
  end

endmodule
