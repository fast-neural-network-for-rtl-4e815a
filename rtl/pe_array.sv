// pe_array -- operational unit: K processing elements that map one layer of
// the synthesis network. A layer has N/4 primitive operations (POs); in step
// t (0 .. ceil(N/(4K))-1) PE k works on PO p = t*K + k, so a layer takes
// ceil(N/(4K)) steps, one clock each. For every PE the array also produces the four data
// lines that PO joins (ugraph_addr); the storage unit uses them as read and
// write addresses, so the same lines carry a neuron's inputs (previous layer,
// operative mode), its own record and its errors.
//
// K may be any value 1..N/4, as the method allows; mapping a whole layer onto
// the array (K = N/4) is the default. When K does not divide N/4 the last
// step of a layer has fewer POs than PEs: po_valid marks the PEs that hold
// a real PO, and the storage unit must not take the results of the others.
// Mapping a layer onto an array of 1..N/4 PEs follows the method; giving PE
// k the PO t*K+k in step t is this design's choice. Combinational.
module pe_array
  import tsu_pkg::*;
#(
  parameter int N = 16,
  parameter int K = N / 4
) (
  input  pe_mode_e                 mode,
  input  logic                     out_layer,
  input  logic [ETA_W-1:0]         eta_j,
  input  logic [$clog2(N)-1:0]     stage,          // 1 .. log2(N)-1
  input  logic [$clog2(N)-1:0]     step,           // 0 .. ceil(N/(4K))-1
  output logic                     po_valid [K],   // PE k holds a real PO
  output logic [$clog2(N)-1:0]     line  [K][4],   // data lines of each PE
  input  data_t                    x     [K][4],
  input  neuron_t                  rec   [K][4],
  input  data_t                    z     [K][4],
  output data_t                    y     [K][4],
  output delta_t                   d_own [K][4],
  output weight_t                  w_new [K][4][4],
  output delta_t                   d_prev[K][4]
);
  localparam int LG = $clog2(N);

  for (genvar k = 0; k < K; k++) begin : g_pe
    logic [LG-1:0] po;
    assign po          = LG'(int'(step) * K + k);
    assign po_valid[k] = (int'(step) * K + k) < N / 4;

    ugraph_addr #(.N(N)) u_addr (
      .stage (stage),
      .po    (po),
      .line  (line[k])
    );

    neuron_pe u_pe (
      .mode      (mode),
      .out_layer (out_layer),
      .eta_j     (eta_j),
      .x         (x[k]),
      .rec       (rec[k]),
      .z         (z[k]),
      .y         (y[k]),
      .d_own     (d_own[k]),
      .w_new     (w_new[k]),
      .d_prev    (d_prev[k])
    );
  end

  initial begin
    assert (K >= 1 && K <= N / 4)
      else $error("pe_array: K must be 1..N/4");
  end
endmodule
