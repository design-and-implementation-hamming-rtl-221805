// tb_hnn_word_net: self-checking testbench for the word-level Hamming
// classifier.
//
// At the default size (2-bit patterns, 3 prototypes) every pattern is
// tried with every prototype set (256 cases). For each case the expected
// answer is found by counting differing bits: the prototype with the
// fewest wins if it is the only one with that count (valid = 1); a tie
// for fewest, or every prototype differing in every bit, gives
// valid = 0. The feed-forward scores and the latency bound (done within
// MAX_ITER + 2 clocks of start) are checked too.
module tb_hnn_word_net;
  localparam int R = 2, S = 3, MAX_ITER = 64;
  localparam int AW = $clog2(2 * R + 1), VW = AW + 6;
  localparam int IW = $clog2(MAX_ITER + 1), XW = $clog2(S);

  logic clk = 1'b0, rst_n, start;
  logic [R-1:0] p;
  logic [S-1:0][R-1:0] proto;
  logic [S-1:0][AW-1:0] a1;
  logic busy, done, valid;
  logic [XW-1:0] winner;
  logic [IW-1:0] iters;
  logic [S-1:0][VW-1:0] a2;
  int checks = 0, failures = 0;
  int n_win = 0, n_nowin = 0;

  hnn_word_net dut (.clk, .rst_n, .start, .p, .proto, .a1, .busy, .done,
                    .valid, .winner, .iters, .a2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d (p=%b proto=%b)", what, got, exp, p, proto);
    end
  endtask

  initial begin
    int hd[S];
    int best, nbest, arg, cycles;
    rst_n = 1'b0; start = 1'b0; p = '0; proto = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 256; c++) begin
      {proto, p} = 8'(c);
      best = R + 1; nbest = 0; arg = 0;
      for (int i = 0; i < S; i++) begin
        hd[i] = 0;
        for (int j = 0; j < R; j++) if (p[j] != proto[i][j]) hd[i]++;
        if (hd[i] < best) begin best = hd[i]; nbest = 1; arg = i; end
        else if (hd[i] == best) nbest++;
      end
      #1;
      for (int i = 0; i < S; i++) expect_int(int'(a1[i]), 2 * (R - hd[i]), "score");
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles <= MAX_ITER + 4) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles > MAX_ITER + 2) begin
        failures++;
        $display("FAIL latency %0d", cycles);
      end
      if (best < R && nbest == 1) begin
        expect_int(int'(valid), 1, "valid");
        expect_int(int'(winner), arg, "winner");
        n_win++;
      end else begin
        expect_int(int'(valid), 0, "no single winner");
        n_nowin++;
      end
      @(negedge clk);
    end
    $display("cases with a winner %0d, without %0d", n_win, n_nowin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
