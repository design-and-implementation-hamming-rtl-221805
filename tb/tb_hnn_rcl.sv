// tb_hnn_rcl: self-checking testbench for the one-bit recurrent layer.
//
// Applies all 64 input combinations and compares F with the layer's
// function: F is 1 when b2 is clear, and otherwise 1 exactly when the
// shared term (not both a1 and a2) is set, w21 or w22 is set and w23 is
// clear. It also checks the recorded board result that F is 1 in all
// eight experiment rows when b2 = 0.
module tb_hnn_rcl;
  logic a1, a2, w21, w22, w23, b2, f;
  int checks = 0, failures = 0;

  hnn_rcl dut (.a1, .a2, .w21, .w22, .w23, .b2, .f);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp, shared;
    logic [7:0] word;
    for (int v = 0; v < 64; v++) begin
      {a1, a2, w21, w22, w23, b2} = 6'(v);
      #1;
      shared = !(a1 && a2);
      exp = (b2 == 1'b0) ? 1'b1 : (shared && (w21 || w22) && !w23);
      checks++;
      if (f !== exp) begin
        failures++;
        $display("FAIL a1=%b a2=%b w=%b%b%b b2=%b f=%b exp=%b",
                 a1, a2, w21, w22, w23, b2, f, exp);
      end
    end
    // Board rows: W21 = row bit 0, W22 = row bit 1, W23 = row bit 2.
    b2 = 1'b0;
    a2 = 1'b0;
    for (int al = 0; al < 2; al++) begin
      a1 = 1'(al);
      for (int r = 0; r < 8; r++) begin
        {w23, w22, w21} = 3'(r);
        #1;
        word[r] = f;
      end
      checks++;
      if (word !== 8'hFF) begin
        failures++;
        $display("FAIL b2=0 a1=%0d F word=%b", al, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
