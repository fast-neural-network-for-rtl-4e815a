// neuron_mem -- storage unit of the synthesis network. It holds one record
// {w0, w1, w2, w3, y, delta} per neuron (tsu_pkg::neuron_t) for all
// m = log2(N)-1 layers of N neurons, M = N*m*(4*N_w + N_y + N_delta) bits in
// all (4608 bits at the defaults N = 16, 16-bit fields), neuron (layer l,
// line q) at word (l-1)*N + q.
//
// Ports, all addressed by data line within a layer:
//   own  [P] : records of the neurons of the current layer cur_layer; read
//              whole, write weights, y and delta separately (field enables)
//   prev [P] : neurons of layer cur_layer-1; read y, write delta (the error
//              a PE sends back in correction mode)
//   host     : read a whole record of any neuron, write one weight
// P = 4K, one port per neuron of the PE array. Reads are combinational,
// writes happen at the rising clock edge. The contents are not reset: the
// host loads the weights and the network writes y and delta before it reads
// them. The record layout and the size formula are the method's; the port
// arrangement (a multi-ported register file) is this design's choice.
module neuron_mem
  import tsu_pkg::*;
#(
  parameter int N = 16,
  parameter int P = N                       // number of own/prev ports (4K)
) (
  input  logic                    clk,
  input  logic [$clog2(N)-1:0]    cur_layer,  // 1 .. m

  input  logic [$clog2(N)-1:0]    own_line [P],
  output neuron_t                 own_rd   [P],
  input  logic                    own_we_w [P],
  input  logic                    own_we_y [P],
  input  logic                    own_we_d [P],
  input  neuron_t                 own_wd   [P],

  input  logic [$clog2(N)-1:0]    prev_line [P],
  output data_t                   prev_rd_y [P],
  input  logic                    prev_we_d [P],
  input  delta_t                  prev_wd_d [P],

  input  logic [$clog2(N)-1:0]    h_layer,
  input  logic [$clog2(N)-1:0]    h_line,
  input  logic                    h_we_w,
  input  logic [1:0]              h_widx,
  input  weight_t                 h_wd,
  output neuron_t                 h_rd
);
  localparam int LG     = $clog2(N);
  localparam int LAYERS = LG - 1;
  localparam int WORDS  = N * LAYERS;
  localparam int AW     = $clog2(WORDS);

  neuron_t mem [WORDS];

  function automatic logic [AW-1:0] addr(input logic [LG-1:0] layer,
                                         input logic [LG-1:0] ln);
    return AW'((int'(layer) - 1) * N + int'(ln));
  endfunction

  logic [LG-1:0] prev_layer;
  assign prev_layer = cur_layer - 1'b1;

  always_comb begin
    for (int p = 0; p < P; p++) begin
      own_rd[p]    = mem[addr(cur_layer, own_line[p])];
      prev_rd_y[p] = mem[addr(prev_layer, prev_line[p])].y;
    end
    h_rd = mem[addr(h_layer, h_line)];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      if (own_we_w[p]) mem[addr(cur_layer, own_line[p])].w <= own_wd[p].w;
      if (own_we_y[p]) mem[addr(cur_layer, own_line[p])].y <= own_wd[p].y;
      if (own_we_d[p]) mem[addr(cur_layer, own_line[p])].d <= own_wd[p].d;
      if (prev_we_d[p]) mem[addr(prev_layer, prev_line[p])].d <= prev_wd_d[p];
    end
    if (h_we_w) mem[addr(h_layer, h_line)].w[h_widx] <= h_wd;
  end

  // The graph gives the ports of one step distinct lines, so no two ports
  // of a group may write the same record in the same clock.
  always @(posedge clk) begin
    for (int p1 = 0; p1 < P; p1++)
      for (int p2 = p1 + 1; p2 < P; p2++) begin
        if ((own_we_w[p1] || own_we_y[p1] || own_we_d[p1]) &&
            (own_we_w[p2] || own_we_y[p2] || own_we_d[p2]))
          a_own_distinct: assert (own_line[p1] != own_line[p2])
            else $error("neuron_mem: own ports %0d and %0d write line %0d", p1, p2, own_line[p1]);
        if (prev_we_d[p1] && prev_we_d[p2])
          a_prev_distinct: assert (prev_line[p1] != prev_line[p2])
            else $error("neuron_mem: prev ports %0d and %0d write line %0d", p1, p2, prev_line[p1]);
      end
  end

endmodule
