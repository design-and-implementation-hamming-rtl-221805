// tb_hnn_gate_net: self-checking testbench for the one-bit gate network.
//
// For each of the four bias settings and each of the eight input rows of
// the board experiment, the network is reset (a2 = 0) and then stepped
// for eight clocks. After every clock a1, a2 and F are compared with a
// reference model that applies the two layers' truth conditions and the
// update a2(t+1) = F(t). The testbench also
//   - compares the eight a1 values of each bias setting, row 1 in bit 0,
//     with the recorded result words (11111111 for b1 = 0, 00010001 for
//     b1 = 1), and the F word right after reset with 11111111 for b2 = 0;
//   - checks that a2 holds while step is low;
//   - counts rows whose loop settles and rows whose loop toggles.
module tb_hnn_gate_net;
  import hnn_pkg::*;

  logic    clk = 1'b0, rst_n, step;
  hnn_sw_t sw;
  logic    a1, a2, f;
  int checks = 0, failures = 0;
  int n_settle = 0, n_toggle = 0;

  hnn_gate_net dut (.clk, .rst_n, .step, .sw, .a1, .a2, .f);

  always #5 clk = ~clk;

  // Rows of the board experiment: {P1, P2, W11, W12, W21, W22, W23}.
  localparam logic [6:0] ROWS [8] = '{
    7'b0000_000, 7'b0101_100, 7'b1010_010, 7'b1111_110,
    7'b0000_001, 7'b0101_101, 7'b1010_011, 7'b1111_111};

  function automatic logic m_a1(input hnn_sw_t s);
    if (!s.b1) return 1'b1;
    return !((s.p1 && s.w11) || (s.p2 && s.w12));
  endfunction

  function automatic logic m_f(input hnn_sw_t s, input logic x1, input logic x2);
    if (!s.b2) return 1'b1;
    return !(x1 && x2) && (s.w21 || s.w22) && !s.w23;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b (sw=%b) at %0t", what, got, exp, sw, $time);
    end
  endtask

  initial begin
    logic [7:0] a1_word, f_word;
    logic m_a2, prev_a2;
    bit toggled, changed;
    step = 1'b1;
    sw   = '0;
    for (int bias = 0; bias < 4; bias++) begin
      for (int r = 0; r < 8; r++) begin
        rst_n = 1'b0;
        sw = '0;
        {sw.p1, sw.p2, sw.w11, sw.w12, sw.w21, sw.w22, sw.w23} = ROWS[r];
        sw.b1 = bias[0];
        sw.b2 = bias[1];
        @(negedge clk);
        rst_n = 1'b1;
        m_a2 = 1'b0;
        expect_eq(a2, 1'b0, "a2 after reset");
        a1_word[r] = a1;
        f_word[r]  = f;
        toggled = 0;
        changed = 0;
        for (int t = 0; t < 8; t++) begin
          expect_eq(a1, m_a1(sw), "a1");
          expect_eq(f, m_f(sw, m_a1(sw), m_a2), "f");
          prev_a2 = m_a2;
          m_a2 = m_f(sw, m_a1(sw), m_a2);
          @(negedge clk);
          expect_eq(a2, m_a2, "a2 update");
          if (t > 0 && m_a2 != prev_a2) toggled = 1;
          if (m_a2 != prev_a2) changed = 1;
        end
        if (toggled) n_toggle++;
        else         n_settle++;
        // hold while step is low
        step = 1'b0;
        prev_a2 = a2;
        repeat (2) @(negedge clk);
        expect_eq(a2, prev_a2, "a2 hold");
        step = 1'b1;
      end
      checks++;
      if (a1_word !== (bias[0] ? 8'b0001_0001 : 8'b1111_1111)) begin
        failures++;
        $display("FAIL a1 word for b1=%0d b2=%0d: %b", bias[0], bias[1], a1_word);
      end
      if (!bias[1]) begin
        checks++;
        if (f_word !== 8'hFF) begin
          failures++;
          $display("FAIL F word for b1=%0d b2=0: %b", bias[0], f_word);
        end
      end
      $display("b1=%0d b2=%0d: a1 word %b, F word after reset %b",
               bias[0], bias[1], a1_word, f_word);
    end
    $display("rows settling %0d, rows toggling %0d", n_settle, n_toggle);
    checks++;
    if (n_settle == 0 || n_toggle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
