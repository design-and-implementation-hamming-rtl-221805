// hnn_top: top level of the Hamming network design.
//
// Two realisations of the same two-layer network stand side by side.
//
// The gate-level network (hnn_gate_net) is the one-bit circuit meant for
// an FPGA board: nine slide switches give the patterns, weights and
// biases, and two LEDs show the intermediate output a1 and the final
// output F. The switch and LED assignment follows the board's pin table:
//   sw[0]=b1  sw[1]=b2  sw[2]=P1  sw[3]=W11  sw[4]=P2  sw[5]=W12
//   sw[6]=W21 sw[7]=W22 sw[8]=W23     ledr[1]=a1  ledr[0]=F
// Here the recurrent feedback advances once per clock (step tied high).
//
// The word-level network (hnn_word_net) holds S prototypes of R bits
// and, after start, reports which prototype is closest to the pattern.
//
// Interface: clk and rst_n (asynchronous, active low) serve both
// networks. Timing: ledr follows sw combinationally except for the fed
// back a2, which updates every clock; the word-level network answers
// with done iters + 2 clocks after start.
module hnn_top
  import hnn_pkg::*;
#(
  parameter int unsigned R         = 2,   // word network: pattern length
  parameter int unsigned S         = 3,   // word network: prototypes
  parameter int unsigned FRAC      = 6,   // word network: fraction bits
  parameter int unsigned EPS_SHIFT = 2,   // word network: eps = 2^-EPS_SHIFT
  parameter int unsigned MAX_ITER  = 64,  // word network: update bound
  localparam int unsigned AW = $clog2(2 * R + 1),
  localparam int unsigned VW = AW + FRAC,
  localparam int unsigned IW = $clog2(MAX_ITER + 1),
  localparam int unsigned XW = (S > 1) ? $clog2(S) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // gate-level network
  input  logic [8:0]           sw,       // slide switches SW8..SW0
  output logic [1:0]           ledr,     // LEDR1 = a1, LEDR0 = F
  output logic                 fb_a2,    // fed-back a2 (not on a LED)
  // word-level network
  input  logic                 start,
  input  logic [R-1:0]         p,
  input  logic [S-1:0][R-1:0]  proto,
  output logic                 busy,
  output logic                 done,
  output logic                 valid,
  output logic [XW-1:0]        winner,
  output logic [IW-1:0]        iters,
  output logic [S-1:0][AW-1:0] scores,   // feed-forward scores a1
  output logic [S-1:0][VW-1:0] state     // recurrent state a2
);

  logic                 g_a1;
  logic                 g_f;

  hnn_gate_net u_gate (
    .clk   (clk),
    .rst_n (rst_n),
    .step  (1'b1),
    .sw    (hnn_sw_t'(sw)),
    .a1    (g_a1),
    .a2    (fb_a2),
    .f     (g_f)
  );

  assign ledr = {g_a1, g_f};

  hnn_word_net #(
    .R(R), .S(S), .FRAC(FRAC), .EPS_SHIFT(EPS_SHIFT), .MAX_ITER(MAX_ITER)
  ) u_word (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .p      (p),
    .proto  (proto),
    .a1     (scores),
    .busy   (busy),
    .done   (done),
    .valid  (valid),
    .winner (winner),
    .iters  (iters),
    .a2     (state)
  );

endmodule
