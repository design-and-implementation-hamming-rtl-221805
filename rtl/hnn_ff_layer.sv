// hnn_ff_layer: word-level feed-forward layer of the Hamming network.
//
// Each of the S neurons stores one R-bit prototype as its weight row.
// Bits are read as bipolar values (0 -> -1, 1 -> +1), so the weighted sum
// of neuron i is the number of agreeing bits minus the number of
// disagreeing ones. Adding the bias R and passing the result through the
// linear transfer function gives
//   a1[i] = W1[i] . p + R = 2 * (R - HammingDistance(p, proto[i]))
// which lies in 0 .. 2R and is largest for the closest prototype.
//
// That the layer multiplies the pattern by a weight matrix, adds a bias
// and uses a linear transfer follows the original design. The bipolar
// reading of the bits and the bias value R are this RTL's choices: they
// make every output non-negative, as the recurrent layer needs.
//
// Interface: p is the pattern, proto[i] the weight row of neuron i, a1[i]
// its output (unsigned, AW bits). Timing: purely combinational.
module hnn_ff_layer #(
  parameter int unsigned R  = 2,                 // pattern length
  parameter int unsigned S  = 3,                 // neurons (prototypes)
  parameter int unsigned AW = $clog2(2 * R + 1)  // output width
) (
  input  logic [R-1:0]         p,      // input pattern
  input  logic [S-1:0][R-1:0]  proto,  // weight rows, one per neuron
  output logic [S-1:0][AW-1:0] a1      // layer outputs
);

  localparam int BIAS = int'(R);

  always_comb begin
    for (int i = 0; i < int'(S); i++) begin
      int n1;
      n1 = BIAS;
      for (int j = 0; j < int'(R); j++)
        n1 += (p[j] == proto[i][j]) ? 1 : -1;
      a1[i] = AW'(n1);  // linear transfer; n1 is never negative
    end
  end

endmodule
