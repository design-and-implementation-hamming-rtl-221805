// tb_hnn_top: end-to-end testbench of the Hamming network top level, at
// its default parameters.
//
// Gate-level network: for every one of the 512 switch settings the
// design is reset and run for six clocks; after each clock both LEDs
// and the fed-back a2 are compared with a reference model of the two
// layers and of the update a2(t+1) = F(t).
// Word-level network: every pattern with every prototype set (256 cases)
// is classified and the answer compared with a count of differing bits.
//
// Mechanisms counted (each must occur at least once):
//   b1 masking  - b1 = 0 holds a1 at 1 although a weighted bit is set
//   b2 masking  - b2 = 0 holds F at 1 although the layer would give 0
//   settle      - the feedback loop reaches a fixed point
//   toggle      - the feedback loop has no fixed point and F toggles
//   win         - competition ends with one prototype left
//   multi-step  - competition needs more than one update
//   tie         - two prototypes tie and the competition gives up
//   no score    - every prototype differs in every bit (all scores 0)
module tb_hnn_top;
  import hnn_pkg::*;
  localparam int R = 2, S = 3, MAX_ITER = 64;
  localparam int AW = $clog2(2 * R + 1), VW = AW + 6;
  localparam int IW = $clog2(MAX_ITER + 1), XW = $clog2(S);

  logic clk = 1'b0, rst_n, start;
  logic [8:0] sw;
  logic [1:0] ledr;
  logic fb_a2;
  logic [R-1:0] p;
  logic [S-1:0][R-1:0] proto;
  logic busy, done, valid;
  logic [XW-1:0] winner;
  logic [IW-1:0] iters;
  logic [S-1:0][AW-1:0] scores;
  logic [S-1:0][VW-1:0] state;
  int checks = 0, failures = 0;
  int n_b1mask = 0, n_b2mask = 0, n_settle = 0, n_toggle = 0;
  int n_win = 0, n_multi = 0, n_tie = 0, n_zero = 0;

  hnn_top dut (.clk, .rst_n, .sw, .ledr, .fb_a2, .start, .p, .proto, .busy,
               .done, .valid, .winner, .iters, .scores, .state);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (sw=%b p=%b proto=%b) at %0t",
               what, got, exp, sw, p, proto, $time);
    end
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    $display("%-12s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    hnn_sw_t s;
    logic e_a1, e_f, e_a2, weighted, prev;
    bit moved;
    int hd[S];
    int best, nbest, arg, cycles;
    rst_n = 1'b0; start = 1'b0; sw = '0; p = '0; proto = '0;

    // ---------------- gate-level network ----------------
    for (int v = 0; v < 512; v++) begin
      rst_n = 1'b0;
      sw = 9'(v);
      s  = hnn_sw_t'(sw);
      @(negedge clk);
      rst_n = 1'b1;
      weighted = (s.p1 && s.w11) || (s.p2 && s.w12);
      e_a1 = !(s.b1 && weighted);
      e_a2 = 1'b0;
      if (!s.b1 && weighted) n_b1mask++;
      if (!s.b2 && !(e_a1 && e_a2) && (s.w21 || s.w22) && !s.w23) n_b2mask++;
      moved = 0;
      for (int t = 0; t < 6; t++) begin
        e_f = !s.b2 || (!(e_a1 && e_a2) && (s.w21 || s.w22) && !s.w23);
        expect_int(int'(fb_a2), int'(e_a2), "a2");
        expect_int(int'(ledr[1]), int'(e_a1), "LEDR1 (a1)");
        expect_int(int'(ledr[0]), int'(e_f), "LEDR0 (F)");
        prev = e_a2;
        e_a2 = e_f;
        if (t > 0 && e_a2 != prev) moved = 1;
        @(negedge clk);
      end
      if (moved) n_toggle++;
      else       n_settle++;
    end

    // ---------------- word-level network ----------------
    for (int c = 0; c < 256; c++) begin
      {proto, p} = 8'(c);
      best = R + 1; nbest = 0; arg = 0;
      for (int i = 0; i < S; i++) begin
        hd[i] = 0;
        for (int j = 0; j < R; j++) if (p[j] != proto[i][j]) hd[i]++;
        if (hd[i] < best) begin best = hd[i]; nbest = 1; arg = i; end
        else if (hd[i] == best) nbest++;
      end
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles <= MAX_ITER + 4) begin
        @(negedge clk);
        cycles++;
      end
      expect_int(int'(done), 1, "done");
      expect_int(cycles, int'(iters) + 2, "latency");
      if (best == R) begin
        expect_int(int'(valid), 0, "all scores zero");
        expect_int(int'(iters), 0, "no update when all zero");
        n_zero++;
      end else if (nbest == 1) begin
        expect_int(int'(valid), 1, "valid");
        expect_int(int'(winner), arg, "winner");
        n_win++;
        if (iters > 1) n_multi++;
      end else begin
        expect_int(int'(valid), 0, "tie");
        expect_int(int'(iters), MAX_ITER, "tie gives up");
        n_tie++;
      end
      @(negedge clk);
    end

    mech("b1 masking", n_b1mask);
    mech("b2 masking", n_b2mask);
    mech("settle", n_settle);
    mech("toggle", n_toggle);
    mech("win", n_win);
    mech("multi-step", n_multi);
    mech("tie", n_tie);
    mech("no score", n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
