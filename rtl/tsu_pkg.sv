// tsu_pkg -- types and number formats shared by the transformation synthesis
// unit (TSU), a hardware neural network whose structure is the graph of the
// U-transformation (a generalized fast trigonometric transform).
//
// Each neuron is kept in the storage unit as one record {w0..w3, y, delta}
// (the layout of the neuron data structure); the widths N_w, N_y and N_delta
// are left open by the method, so this design fixes them here:
//   weights  : 16-bit signed, Q2.14 (range [-2, 2), enough for the +-1, 0,
//              cos and sin coefficients of the standard transforms)
//   y, delta : 16-bit signed, Q8.8 (integer headroom for the gain of up to
//              N that a length-N transform has)
// All arithmetic rounds to nearest (add half an LSB, arithmetic shift) and
// saturates to the destination width. These formats are design choices.
package tsu_pkg;

  localparam int NW      = 16;  // weighting coefficient width N_w
  localparam int NY      = 16;  // excitation function width N_y
  localparam int ND      = 16;  // error function width N_delta
  localparam int W_FRAC  = 14;  // fraction bits of a weight
  localparam int Y_FRAC  = 8;   // fraction bits of y and of delta
  localparam int ETA_W   = 4;   // width of the learning-rate exponent j

  // Shift that brings delta*x (Y_FRAC+Y_FRAC fraction bits) to weight scale.
  localparam int DW_SHIFT = 2 * Y_FRAC - W_FRAC;

  typedef logic signed [NW-1:0] weight_t;
  typedef logic signed [NY-1:0] data_t;
  typedef logic signed [ND-1:0] delta_t;

  // One neuron in memory: w[0..3], y, delta.
  typedef struct packed {
    weight_t [3:0] w;   // w[i] multiplies input x_i
    data_t         y;   // excitation function value, eq. (2)
    delta_t        d;   // error function value, eq. (3)/(4)
  } neuron_t;


  // PE mode: operative = eq. (2); correction = eq. (3), (4), (5).
  typedef enum logic {
    MODE_OPER = 1'b0,
    MODE_CORR = 1'b1
  } pe_mode_e;

  // Round-to-nearest arithmetic right shift of a wide signed value.
  function automatic logic signed [47:0] rshift_rnd(input logic signed [47:0] v,
                                                     input int unsigned sh);
    logic signed [47:0] half;
    if (sh == 0) return v;
    half = 48'sd1 <<< (sh - 1);
    return (v + half) >>> sh;
  endfunction

  // Saturate a wide signed value to a 16-bit signed word.
  function automatic logic signed [15:0] sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)  return 16'sh7fff;
    if (v < -48'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

endpackage
