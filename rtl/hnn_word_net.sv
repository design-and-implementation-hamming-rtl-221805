// hnn_word_net: word-level Hamming classifier.
//
// The feed-forward layer scores how close the input pattern is to each
// of S stored R-bit prototypes (a1[i] = 2 * number of agreeing bits); the
// recurrent layer then lets the scores inhibit one another until a
// single prototype remains, which is reported as the winner. This is the
// two-layer structure of the original design, written at word level.
//
// Interface: p and proto must be held from the start cycle (they are
// sampled then); start, busy, done, valid, winner, iters and a2 are those
// of hnn_rc_layer, and a1 shows the feed-forward scores. Timing: done
// comes iters + 2 clocks after start.
module hnn_word_net #(
  parameter int unsigned R         = 2,   // pattern length
  parameter int unsigned S         = 3,   // prototypes / neurons
  parameter int unsigned FRAC      = 6,   // fraction bits, recurrent state
  parameter int unsigned EPS_SHIFT = 2,   // eps = 2^-EPS_SHIFT
  parameter int unsigned MAX_ITER  = 64,  // give-up bound on updates
  localparam int unsigned AW = $clog2(2 * R + 1),
  localparam int unsigned VW = AW + FRAC,
  localparam int unsigned IW = $clog2(MAX_ITER + 1),
  localparam int unsigned XW = (S > 1) ? $clog2(S) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [R-1:0]         p,
  input  logic [S-1:0][R-1:0]  proto,
  output logic [S-1:0][AW-1:0] a1,
  output logic                 busy,
  output logic                 done,
  output logic                 valid,
  output logic [XW-1:0]        winner,
  output logic [IW-1:0]        iters,
  output logic [S-1:0][VW-1:0] a2
);

  hnn_ff_layer #(.R(R), .S(S), .AW(AW)) u_ff (
    .p     (p),
    .proto (proto),
    .a1    (a1)
  );

  hnn_rc_layer #(
    .S(S), .AW(AW), .FRAC(FRAC), .EPS_SHIFT(EPS_SHIFT), .MAX_ITER(MAX_ITER)
  ) u_rc (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .a1     (a1),
    .busy   (busy),
    .done   (done),
    .valid  (valid),
    .winner (winner),
    .iters  (iters),
    .a2     (a2)
  );

endmodule
