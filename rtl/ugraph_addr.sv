// ugraph_addr -- interconnect of the U-transformation graph.
//
// An N-point U-transformation is two N/2-point U-transformations followed by
// a join stage of N/4 four-point primitive operations (POs); unrolled, it has
// m = log2(N)-1 stages of N/4 POs each. Stage s (1..m) joins blocks of
// S = 2^(s+1) lines made of two halves of L = S/2 lines. This module gives,
// for stage s and PO index p (0..N/4-1), the four data lines that PO reads
// and writes (in place, so no transposition block is needed):
//   block b = p / (S/4), q = p mod (S/4), base = b*S
//   q == 0 : base + {0, L/2, L, L + L/2}
//   q >  0 : base + {q, L-q, L+q, S-q}
// i.e. line k of each half is paired with its mirror line L-k, as in fast
// Hartley-type algorithms for real data. The join rule is from the method;
// the line pairing inside a join stage is this design's reading of it.
// A neuron of stage s at line q feeds, in stage s+1, exactly the PO that
// holds line q, which is what makes per-line storage and backward error
// propagation in place possible.
//
// Purely combinational.
module ugraph_addr #(
  parameter int N = 16
) (
  input  logic [$clog2(N)-1:0] stage,   // 1 .. log2(N)-1
  input  logic [$clog2(N)-1:0] po,      // 0 .. N/4-1
  output logic [$clog2(N)-1:0] line [4] // lines of PO inputs/outputs a0..a3
);
  localparam int LG = $clog2(N);

  logic [LG:0] s_size, half, qmask, q, base;

  always_comb begin
    s_size = (LG+1)'(1) << (stage + 1'b1);   // S
    half   = s_size >> 1;                    // L
    qmask  = (s_size >> 2) - 1'b1;           // S/4 - 1
    q      = {1'b0, po} & qmask;
    base   = ({1'b0, po} & ~qmask) << 2;     // (p / (S/4)) * S
    if (q == '0) begin
      line[0] = LG'(base);
      line[1] = LG'(base + (half >> 1));
      line[2] = LG'(base + half);
      line[3] = LG'(base + half + (half >> 1));
    end else begin
      line[0] = LG'(base + q);
      line[1] = LG'(base + half - q);
      line[2] = LG'(base + half + q);
      line[3] = LG'(base + s_size - q);
    end
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $error("ugraph_addr: N must be a power of two >= 4");
  end
endmodule
