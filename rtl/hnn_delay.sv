// hnn_delay: delay element of the recurrent loop.
//
// Holds the recurrent layer's previous output: q(t) = d(t-1). It is the
// "D" box of the recurrent layer. Reset clears it to 0, which is the
// initial feedback value a2 = 0 of the original design. Making the delay
// a clocked flip-flop with an asynchronous active-low reset is a choice
// of this RTL: the original closed the loop with a wire, which is a
// combinational loop whose value depends on gate delays.
//
// Interface: clk, rst_n (asynchronous, active low), en (load enable),
// d, q. Timing: q takes d one clock after a cycle with en = 1.
module hnn_delay #(
  parameter logic INIT = 1'b0  // value after reset (initial a2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= INIT;
    else if (en) q <= d;
  end

endmodule
