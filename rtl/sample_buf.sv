// sample_buf -- buffer of one N-sample vector. The synthesis unit has two:
// the training input x (the outputs of "layer 0", read as the inputs of the
// first layer) and the reference z that the output layer is trained toward,
// delta = z - y. The host writes one sample per clock through the write
// port while the network is idle; the PE array reads up to P samples per
// clock, addressed by data line, combinationally. Samples are stored in the
// order of the data lines of the network graph. Not reset: the host fills it
// before a run. The buffer itself is this design's choice; the method only
// names the input data and the reference signal.
module sample_buf
  import tsu_pkg::*;
#(
  parameter int N = 16,
  parameter int P = N
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  data_t                wdata,
  input  logic [$clog2(N)-1:0] raddr [P],
  output data_t                rdata [P]
);
  data_t mem [N];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb
    for (int p = 0; p < P; p++) rdata[p] = mem[raddr[p]];

endmodule
