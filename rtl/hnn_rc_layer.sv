// hnn_rc_layer: word-level recurrent (competitive) layer of the Hamming
// network.
//
// On start the layer loads its state from the feed-forward outputs,
// a2(0) = a1, and then updates all S neurons once per clock:
//   a2[i](t+1) = poslin( a2[i](t) - eps * sum_{k != i} a2[k](t) )
// i.e. the recurrent weight matrix has 1 on the diagonal and -eps
// elsewhere, and the transfer is positive-linear. Every neuron inhibits
// the others, so all but the largest fall to zero. The layer stops as
// soon as at most one neuron is non-zero and reports that neuron.
//
// The recurrence, the weight matrix, the positive-linear transfer, the
// stopping rule and the bound 0 < eps < 1/S follow the original design.
// This RTL's choices: eps is a power of two, 2^-EPS_SHIFT (1/4 by
// default); the state is a fixed-point number with FRAC fraction bits
// and the product eps * sum is truncated; and the loop gives up after
// MAX_ITER updates, which only happens when two neurons tie for the
// largest value and so never separate (valid is then 0).
//
// Interface: start (one cycle, taken while idle) loads a1; busy is high
// while competing; done pulses for one cycle with valid (exactly one
// neuron left), winner (its index), iters (updates made) and a2 (the
// final state, FRAC fraction bits). Timing: done comes iters + 2 clocks
// after start: one to load, one per update, one to test the stop rule.
module hnn_rc_layer
  import hnn_pkg::*;
#(
  parameter int unsigned S         = 3,   // neurons
  parameter int unsigned AW        = 3,   // width of a1 (integer)
  parameter int unsigned FRAC      = 6,   // fraction bits of the state
  parameter int unsigned EPS_SHIFT = 2,   // eps = 2^-EPS_SHIFT
  parameter int unsigned MAX_ITER  = 64,  // give-up bound on updates
  localparam int unsigned VW = AW + FRAC,
  localparam int unsigned IW = $clog2(MAX_ITER + 1),
  localparam int unsigned XW = (S > 1) ? $clog2(S) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,   // asynchronous, active low
  input  logic                 start,   // load a1 and begin competing
  input  logic [S-1:0][AW-1:0] a1,      // feed-forward layer outputs
  output logic                 busy,    // competition under way
  output logic                 done,    // one-cycle completion pulse
  output logic                 valid,   // exactly one neuron survived
  output logic [XW-1:0]        winner,  // index of the surviving neuron
  output logic [IW-1:0]        iters,   // updates made
  output logic [S-1:0][VW-1:0] a2       // current / final state
);

  // eps must satisfy 0 < eps < 1/S, and the sums must fit in an int.
  if ((2 ** EPS_SHIFT) <= S) begin : g_eps_check
    $error("hnn_rc_layer: eps = 2^-EPS_SHIFT must be below 1/S");
  end
  if (VW + $clog2(S + 1) >= 31) begin : g_width_check
    $error("hnn_rc_layer: state too wide for 32-bit sums");
  end

  rc_state_t             state;
  logic [S-1:0][VW-1:0]  a2_next;
  logic [S-1:0]          nonzero;
  int unsigned           n_nonzero;
  logic [XW-1:0]         lead;     // lowest-numbered non-zero neuron

  always_comb begin
    int total;
    total = 0;
    for (int i = 0; i < int'(S); i++) total += int'(a2[i]);
    lead = '0;
    for (int i = int'(S) - 1; i >= 0; i--) begin
      int others;
      others     = total - int'(a2[i]);
      a2_next[i] = VW'(poslin(int'(a2[i]) - (others >>> EPS_SHIFT)));
      nonzero[i] = (a2[i] != '0);
      if (nonzero[i]) lead = XW'(i);
    end
    n_nonzero = $countones(nonzero);
  end

  assign busy = (state == RC_ITER);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= RC_IDLE;
      a2     <= '0;
      iters  <= '0;
      done   <= 1'b0;
      valid  <= 1'b0;
      winner <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        RC_IDLE: begin
          if (start) begin
            for (int i = 0; i < int'(S); i++) a2[i] <= VW'(a1[i]) << FRAC;
            iters <= '0;
            state <= RC_ITER;
          end
        end
        RC_ITER: begin
          if (n_nonzero <= 1 || iters == IW'(MAX_ITER)) begin
            done   <= 1'b1;
            valid  <= (n_nonzero == 1);
            winner <= lead;
            state  <= RC_IDLE;
          end else begin
            a2    <= a2_next;
            iters <= iters + 1'b1;
          end
        end
        default: state <= RC_IDLE;
      endcase
    end
  end

  // done is a single-cycle pulse, and a competition reported as valid
  // leaves exactly one neuron standing. The checks are disabled during
  // reset, when the registers may not yet hold their reset values; using
  // rst_n here as well as as the flops' asynchronous reset makes a linter
  // report rst_n as used both ways, which is harmless for an assertion.
  a_done_pulse : assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done);
  a_one_left : assert property (@(posedge clk) disable iff (!rst_n)
    (done && valid) |-> ($countones(nonzero) == 1));

endmodule
