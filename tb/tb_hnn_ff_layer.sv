// tb_hnn_ff_layer: self-checking testbench for the word-level
// feed-forward layer.
//
// At the default size (2-bit patterns, 3 prototypes) every pattern is
// applied with every prototype set (256 cases). A second instance with
// 7-bit patterns and 4 prototypes gets 300 random cases. Each score is
// compared with 2 * (R - number of differing bits), counted bit by bit.
module tb_hnn_ff_layer;
  localparam int R0 = 2, S0 = 3, AW0 = $clog2(2 * R0 + 1);
  localparam int R1 = 7, S1 = 4, AW1 = $clog2(2 * R1 + 1);

  logic [R0-1:0]          p0;
  logic [S0-1:0][R0-1:0]  w0;
  logic [S0-1:0][AW0-1:0] a0;
  logic [R1-1:0]          p1;
  logic [S1-1:0][R1-1:0]  w1;
  logic [S1-1:0][AW1-1:0] a1;
  int checks = 0, failures = 0;

  hnn_ff_layer dut0 (.p(p0), .proto(w0), .a1(a0));
  hnn_ff_layer #(.R(R1), .S(S1)) dut1 (.p(p1), .proto(w1), .a1(a1));

  function automatic int score(input int r, input logic [31:0] p,
                               input logic [31:0] w);
    int d = 0;
    for (int j = 0; j < r; j++) if (p[j] != w[j]) d++;
    return 2 * (r - d);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {w0, p0} = 8'(v);
      #1;
      for (int i = 0; i < S0; i++) begin
        checks++;
        if (int'(a0[i]) != score(R0, 32'(p0), 32'(w0[i]))) begin
          failures++;
          $display("FAIL R=2 p=%b w=%b a1=%0d", p0, w0[i], a0[i]);
        end
      end
    end
    for (int v = 0; v < 300; v++) begin
      p1 = R1'($urandom);
      for (int i = 0; i < S1; i++) w1[i] = R1'($urandom);
      #1;
      for (int i = 0; i < S1; i++) begin
        checks++;
        if (int'(a1[i]) != score(R1, 32'(p1), 32'(w1[i]))) begin
          failures++;
          $display("FAIL R=7 p=%b w=%b a1=%0d", p1, w1[i], a1[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
