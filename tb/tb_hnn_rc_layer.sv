// tb_hnn_rc_layer: self-checking testbench for the word-level recurrent
// layer.
//
// Each case loads three scores a1 and waits for done. The result is
// checked two ways:
//   - against the plain rule: a unique largest score wins (valid = 1,
//     winner = its index); a tie for the largest, or all scores zero,
//     gives valid = 0;
//   - against a cycle-free reference loop of the same fixed-point update
//     (eps = 1/4, 6 fraction bits), which gives the number of updates,
//     and hence the latency done = iters + 2 clocks after start, and the
//     final state.
// The cases are all 125 score triples from 0..4 (the range the default
// feed-forward layer produces). Busy must be high from the clock after
// start until done.
module tb_hnn_rc_layer;
  localparam int S = 3, AW = 3, FRAC = 6, EPS_SHIFT = 2, MAX_ITER = 64;
  localparam int VW = AW + FRAC, IW = $clog2(MAX_ITER + 1), XW = $clog2(S);

  logic clk = 1'b0, rst_n, start;
  logic [S-1:0][AW-1:0] a1;
  logic busy, done, valid;
  logic [XW-1:0] winner;
  logic [IW-1:0] iters;
  logic [S-1:0][VW-1:0] a2;
  int checks = 0, failures = 0;
  int n_multi = 0, n_tie = 0;

  hnn_rc_layer dut (.clk, .rst_n, .start, .a1, .busy, .done, .valid,
                    .winner, .iters, .a2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (a1 = %0d %0d %0d)", what, got, exp,
               a1[0], a1[1], a1[2]);
    end
  endtask

  initial begin
    int v[S], nv[S];
    int maxv, nmax, argmax, steps, cycles, alive, tot;
    rst_n = 1'b0; start = 1'b0; a1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 125; c++) begin
      a1[0] = AW'(c % 5);
      a1[1] = AW'((c / 5) % 5);
      a1[2] = AW'(c / 25);
      // plain rule
      maxv = -1; nmax = 0; argmax = 0;
      for (int i = 0; i < S; i++) begin
        if (int'(a1[i]) > maxv) begin maxv = int'(a1[i]); nmax = 1; argmax = i; end
        else if (int'(a1[i]) == maxv) nmax++;
      end
      // reference loop
      for (int i = 0; i < S; i++) v[i] = int'(a1[i]) * (1 << FRAC);
      steps = 0;
      forever begin
        alive = 0;
        for (int i = 0; i < S; i++) if (v[i] != 0) alive++;
        if (alive <= 1 || steps == MAX_ITER) break;
        tot = 0;
        for (int i = 0; i < S; i++) tot += v[i];
        for (int i = 0; i < S; i++) begin
          nv[i] = v[i] - ((tot - v[i]) / (1 << EPS_SHIFT));
          if (nv[i] < 0) nv[i] = 0;
        end
        v = nv;
        steps++;
      end
      // run the block
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      expect_int(int'(busy), 1, "busy after start");
      while (!done) begin
        @(negedge clk);
        cycles++;
        if (cycles > MAX_ITER + 5) break;
      end
      expect_int(int'(valid), (maxv > 0 && nmax == 1) ? 1 : 0, "valid");
      if (maxv > 0 && nmax == 1) expect_int(int'(winner), argmax, "winner");
      expect_int(int'(iters), steps, "updates");
      expect_int(cycles, steps + 2, "latency");
      for (int i = 0; i < S; i++) expect_int(int'(a2[i]), v[i], "final state");
      if (steps > 1) n_multi++;
      if (maxv > 0 && nmax > 1) n_tie++;
      @(negedge clk);
      expect_int(int'(done), 0, "done is a pulse");
      expect_int(int'(busy), 0, "idle after done");
    end
    $display("cases needing several updates %0d, ties %0d", n_multi, n_tie);
    checks++;
    if (n_multi == 0 || n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
