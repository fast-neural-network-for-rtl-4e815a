// tsu_top -- transformation synthesis unit (TSU): a fast linear neural
// network with the structure of the U-transformation graph, trained by
// back-propagation to find the coefficients of a fast trigonometric
// transform (Fourier, Hartley, cosine, sine, Walsh-Hadamard, Haar,
// Vilenkin-Chrestenson, or a new one that suits an application better).
//
// The network has m = log2(N)-1 layers of N four-input neurons; each group
// of four neurons replaces one 4-point primitive operation of the transform,
// and its 16 weights are that operation's coefficients. The design splits it
// into a storage unit (neuron_mem: one {w0..w3, y, delta} record per neuron;
// sample_buf: input x and reference z) and an operational unit (pe_array:
// K PEs that map one layer), sequenced by tsu_ctrl:
//   operative pass  : layers 1..m in turn, y = sum x_i w_i    (eq. 2)
//   correction pass : layers m..1 in turn, delta = z - y at the output,
//                     errors sent back through the weights (eq. 4) and
//                     w += 2^-j * delta * x                   (eq. 5)
//
// Host interface (only while busy is low):
//   smp_we/smp_ref/smp_addr/smp_data : write sample smp_addr of x (smp_ref=0)
//                                      or of the reference z (smp_ref=1)
//   h_layer/h_line/h_we_w/h_widx/h_wd: write weight h_widx of neuron
//                                      (h_layer, h_line); h_rd is the whole
//                                      record of that neuron, read at any time
//   start/train/eta_j                : one-clock start of a run; train adds
//                                      the correction pass; eta = 2^-eta_j
//   busy/done                        : run in progress / one-clock end pulse
// Samples and neurons are indexed by data line of the network graph (see
// ugraph_addr). Timing: a run takes m*ceil(N/(4K)) clocks, twice that when
// training, and done rises right after (see tsu_ctrl). The unit/mode split
// and layer order follow the method; the host interface is this design's.
module tsu_top
  import tsu_pkg::*;
#(
  parameter int N = 16,
  parameter int K = N / 4
) (
  input  logic                 clk,
  input  logic                 rst_n,

  input  logic                 start,
  input  logic                 train,
  input  logic [ETA_W-1:0]     eta_j,
  output logic                 busy,
  output logic                 done,

  input  logic                 smp_we,
  input  logic                 smp_ref,
  input  logic [$clog2(N)-1:0] smp_addr,
  input  data_t                smp_data,

  input  logic [$clog2(N)-1:0] h_layer,
  input  logic [$clog2(N)-1:0] h_line,
  input  logic                 h_we_w,
  input  logic [1:0]           h_widx,
  input  weight_t              h_wd,
  output neuron_t              h_rd
);
  localparam int LG = $clog2(N);
  localparam int P  = 4 * K;

  // ---------------- controller ----------------
  pe_mode_e      mode;
  logic [LG-1:0] stage, step;
  logic          out_layer, we_y, we_corr, we_prev_d;

  tsu_ctrl #(.N(N), .K(K)) u_ctrl (
    .clk, .rst_n, .start, .train, .busy, .done,
    .mode, .stage, .step, .out_layer, .we_y, .we_corr, .we_prev_d
  );

  // ---------------- operational unit ----------------
  logic          po_valid [K];
  logic [LG-1:0] line   [K][4];
  data_t         pe_x   [K][4];
  neuron_t       pe_rec [K][4];
  data_t         pe_z   [K][4];
  data_t         pe_y   [K][4];
  delta_t        pe_dow [K][4];
  weight_t       pe_wn  [K][4][4];
  delta_t        pe_dpr [K][4];

  pe_array #(.N(N), .K(K)) u_array (
    .mode, .out_layer, .eta_j, .stage, .step,
    .po_valid (po_valid),
    .line   (line),
    .x      (pe_x),
    .rec    (pe_rec),
    .z      (pe_z),
    .y      (pe_y),
    .d_own  (pe_dow),
    .w_new  (pe_wn),
    .d_prev (pe_dpr)
  );

  // ---------------- storage unit ----------------
  logic [LG-1:0] p_line   [P];
  neuron_t       own_rd   [P];
  logic          own_we_w [P], own_we_y [P], own_we_d [P];
  neuron_t       own_wd   [P];
  data_t         prev_y   [P];
  logic          prev_we  [P];
  delta_t        prev_wd  [P];
  data_t         x_rd     [P];
  data_t         z_rd     [P];

  neuron_mem #(.N(N), .P(P)) u_mem (
    .clk,
    .cur_layer (stage),
    .own_line  (p_line),
    .own_rd    (own_rd),
    .own_we_w  (own_we_w),
    .own_we_y  (own_we_y),
    .own_we_d  (own_we_d),
    .own_wd    (own_wd),
    .prev_line (p_line),
    .prev_rd_y (prev_y),
    .prev_we_d (prev_we),
    .prev_wd_d (prev_wd),
    .h_layer, .h_line, .h_we_w, .h_widx, .h_wd, .h_rd
  );

  sample_buf #(.N(N), .P(P)) u_xbuf (
    .clk, .we(smp_we && !smp_ref), .waddr(smp_addr), .wdata(smp_data),
    .raddr(p_line), .rdata(x_rd)
  );

  sample_buf #(.N(N), .P(P)) u_zbuf (
    .clk, .we(smp_we && smp_ref), .waddr(smp_addr), .wdata(smp_data),
    .raddr(p_line), .rdata(z_rd)
  );

  // ---------------- wiring: PE k, neuron/input n <-> port 4k+n ------------
  // The graph is in place: input n of a PO and output n of the same PO sit
  // on the same data line, in the previous and the current layer.
  always_comb begin
    for (int k = 0; k < K; k++) begin
      for (int n = 0; n < 4; n++) begin
        p_line[4*k+n]    = line[k][n];
        pe_x[k][n]       = (int'(stage) == 1) ? x_rd[4*k+n] : prev_y[4*k+n];
        pe_rec[k][n]     = own_rd[4*k+n];
        pe_z[k][n]       = z_rd[4*k+n];
        own_we_y[4*k+n]  = we_y && po_valid[k];
        own_we_w[4*k+n]  = we_corr && po_valid[k];
        own_we_d[4*k+n]  = we_corr && out_layer && po_valid[k];
        for (int i = 0; i < 4; i++) own_wd[4*k+n].w[i] = pe_wn[k][n][i];
        own_wd[4*k+n].y  = pe_y[k][n];
        own_wd[4*k+n].d  = pe_dow[k][n];
        prev_we[4*k+n]   = we_prev_d && po_valid[k];
        prev_wd[4*k+n]   = pe_dpr[k][n];
      end
    end
  end

  // Host accesses to the storage unit are allowed only between runs.
  a_host_idle: assert property (@(posedge clk)
    (smp_we || h_we_w) |-> !busy);

endmodule
