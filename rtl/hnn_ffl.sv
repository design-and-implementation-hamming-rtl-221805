// hnn_ffl: one-bit feed-forward layer of the gate-level Hamming network.
//
// The two pattern bits are each gated by their weight, the two weighted
// terms are merged, and the bias b1 decides whether the merged term
// reaches the output. The whole layer is four two-input NAND gates:
//   a1 = NAND( NAND( NAND(p1,w11), NAND(p2,w12) ), b1 )
// which is a1 = ~(b1 & ((p1 & w11) | (p2 & w12))). With b1 = 0 the
// output is 1 whatever the pattern; with b1 = 1 it is 0 exactly when a
// weighted pattern bit is set.
//
// The gate network is the one of the original design; writing it as
// named intermediate nets is a choice of this RTL.
//
// Interface: all ports are single bits. Timing: purely combinational,
// four NAND levels from p/w to a1, two from b1.
module hnn_ffl (
  input  logic p1,   // pattern bit P1
  input  logic p2,   // pattern bit P2
  input  logic w11,  // weight of P1
  input  logic w12,  // weight of P2
  input  logic b1,   // bias
  output logic a1    // layer output
);

  logic n_p1;   // inverted weighted P1
  logic n_p2;   // inverted weighted P2
  logic n_sum;  // merged weighted pattern

  always_comb begin
    n_p1  = ~(p1 & w11);
    n_p2  = ~(p2 & w12);
    n_sum = ~(n_p1 & n_p2);
    a1    = ~(n_sum & b1);
  end

endmodule
