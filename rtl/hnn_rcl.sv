// hnn_rcl: one-bit recurrent layer of the gate-level Hamming network.
//
// The layer first merges its two inputs, the feed-forward output a1 and
// the fed-back previous output a2, into one shared term s = NAND(a1,a2).
// That term is gated by each of the three weights; the w21 and w22
// branches are merged, the result is combined with the w23 branch, and
// the bias b2 decides whether the combination reaches the output F.
// Seven two-input NAND gates:
//   s  = NAND(a1, a2)
//   g3 = NAND( NAND(s,w21), NAND(s,w22) )      = s & (w21 | w22)
//   g5 = NAND( g3, NAND(s,w23) )
//   F  = NAND( g5, b2 )
// so F = ~b2 | (s & (w21 | w22) & ~w23). With b2 = 0 the output is 1.
//
// The gate network (seven gates, their inputs and their nesting) is the
// one of the original design; the names of the intermediate nets are
// this RTL's.
//
// Interface: all ports are single bits. Timing: purely combinational.
// The feedback from F to a2 is not closed here: the caller closes it
// through a register (see hnn_delay), so no combinational loop exists.
module hnn_rcl (
  input  logic a1,   // feed-forward layer output
  input  logic a2,   // previous output, fed back
  input  logic w21,  // recurrent weight 1
  input  logic w22,  // recurrent weight 2
  input  logic w23,  // recurrent weight 3
  input  logic b2,   // bias
  output logic f     // network output F
);

  logic s;      // shared term of a1 and a2
  logic n_w21;  // inverted s & w21
  logic n_w22;  // inverted s & w22
  logic n_w23;  // inverted s & w23
  logic g3;     // s & (w21 | w22)
  logic g5;     // ~g3 | (s & w23)

  always_comb begin
    s     = ~(a1 & a2);
    n_w21 = ~(s & w21);
    n_w22 = ~(s & w22);
    n_w23 = ~(s & w23);
    g3    = ~(n_w21 & n_w22);
    g5    = ~(g3 & n_w23);
    f     = ~(g5 & b2);
  end

endmodule
