// hnn_gate_net: the one-bit Hamming network as built from NAND gates.
//
// The feed-forward layer (hnn_ffl) turns the two pattern bits, their two
// weights and bias b1 into a1. The recurrent layer (hnn_rcl) combines a1
// with its own previous output a2, the three recurrent weights and bias
// b2 into the network output F. F is fed back as a2 through hnn_delay,
// which starts at 0 after reset. Both a1 and F are outputs, as on the
// board, where a1 drives LEDR1 and F drives LEDR0.
//
// The two layers, their connection and the feedback of F into a2 follow
// the original design. The register in the feedback path is this RTL's
// choice: it turns the original wire loop into one update per clock, so
// a2(t+1) = F(t), and an input setting whose loop has no fixed point
// makes F toggle at half the clock rate instead of racing.
//
// Interface: clk, rst_n (asynchronous, active low), step (loads F into
// a2 on the next edge), sw (the nine inputs), a1, a2 and f. Timing: a1
// and f are combinational from sw and a2; a2 changes one clock after a
// cycle with step = 1.
module hnn_gate_net
  import hnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,  // advance the recurrent loop by one update
  input  hnn_sw_t sw,    // patterns, weights and biases
  output logic    a1,    // feed-forward layer output
  output logic    a2,    // fed-back previous output
  output logic    f      // network output F
);

  hnn_ffl u_ffl (
    .p1  (sw.p1),
    .p2  (sw.p2),
    .w11 (sw.w11),
    .w12 (sw.w12),
    .b1  (sw.b1),
    .a1  (a1)
  );

  hnn_rcl u_rcl (
    .a1  (a1),
    .a2  (a2),
    .w21 (sw.w21),
    .w22 (sw.w22),
    .w23 (sw.w23),
    .b2  (sw.b2),
    .f   (f)
  );

  hnn_delay #(.INIT(1'b0)) u_delay (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (step),
    .d     (f),
    .q     (a2)
  );

endmodule
