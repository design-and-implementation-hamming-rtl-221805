// tb_hnn_ffl: self-checking testbench for the one-bit feed-forward layer.
//
// Applies all 32 input combinations and compares a1 with the layer's
// function written as a truth condition (a1 is 0 exactly when b1 is set
// and some pattern bit meets a set weight). It then replays the eight
// input rows of the board experiment for b1 = 0 and b1 = 1 and compares
// the eight a1 values, row 1 in bit 0, with the recorded result words
// 8'b11111111 and 8'b00010001.
module tb_hnn_ffl;
  logic p1, p2, w11, w12, b1, a1;
  int checks = 0, failures = 0;

  hnn_ffl dut (.p1, .p2, .w11, .w12, .b1, .a1);

  // Board experiment rows: {P1, P2, W11, W12}; rows 5..8 repeat rows 1..4
  // (they differ only in W23, which this layer does not see).
  localparam logic [3:0] ROWS [8] = '{4'b0000, 4'b0101, 4'b1010, 4'b1111,
                                      4'b0000, 4'b0101, 4'b1010, 4'b1111};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    logic [7:0] word;
    for (int v = 0; v < 32; v++) begin
      {p1, p2, w11, w12, b1} = 5'(v);
      #1;
      if (b1 == 1'b0)                          exp = 1'b1;
      else if ((p1 && w11) || (p2 && w12))     exp = 1'b0;
      else                                     exp = 1'b1;
      checks++;
      if (a1 !== exp) begin
        failures++;
        $display("FAIL p1=%b p2=%b w11=%b w12=%b b1=%b a1=%b exp=%b",
                 p1, p2, w11, w12, b1, a1, exp);
      end
    end
    for (int b = 0; b < 2; b++) begin
      b1 = 1'(b);
      for (int r = 0; r < 8; r++) begin
        {p1, p2, w11, w12} = ROWS[r];
        #1;
        word[r] = a1;
      end
      checks++;
      if (word !== (b == 0 ? 8'b1111_1111 : 8'b0001_0001)) begin
        failures++;
        $display("FAIL board rows b1=%0d a1 word=%b", b, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
