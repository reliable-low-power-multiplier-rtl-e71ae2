// Self-checking testbench for wallace_tree. Four shapes are driven with random,
// unrelated bits in every array position (not only AND terms), so each adder's
// wiring is exercised: the default full 12 x 12 array, the replica's truncated
// 6 x 6 array (columns of weight >= 2^6 plus seven extra bits in column 6), a full
// 4 x 4 array, and a 3 x 3 array with one extra bit in column 0. The expected sum is the
// integer sum of every built bit times its weight.
module tb_wallace_tree;
  logic [11:0] pp12 [12];
  logic [23:0] s12;
  logic [5:0]  pp6 [6];
  logic [6:0]  ex6;
  logic [11:0] s6;
  logic [3:0]  pp4 [4];
  logic [7:0]  s4;
  logic [2:0]  pp3 [3];
  logic        ex3;
  logic [5:0]  s3;
  int checks = 0, failures = 0;

  wallace_tree dut12 (.pp(pp12), .extra(1'b0), .sum(s12));
  wallace_tree #(.N(6), .KEEP_FROM(6), .NEXTRA(7), .EXTRA_COL(6)) dut6 (.pp(pp6), .extra(ex6), .sum(s6));
  wallace_tree #(.N(4)) dut4 (.pp(pp4), .extra(1'b0), .sum(s4));
  wallace_tree #(.N(3), .KEEP_FROM(0), .NEXTRA(1), .EXTRA_COL(0)) dut3 (.pp(pp3), .extra(ex3), .sum(s3));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e12, e6, e4, e3;
    for (int k = 0; k < 5000; k++) begin
      e12 = 0; e6 = 0; e4 = 0; e3 = 0;
      for (int j = 0; j < 12; j++) begin
        pp12[j] = (k == 0) ? 12'hfff : 12'($urandom);
        for (int i = 0; i < 12; i++) e12 += longint'(pp12[j][i]) << (i + j);
      end
      for (int j = 0; j < 6; j++) begin
        pp6[j] = (k == 0) ? 6'h3f : 6'($urandom);
        for (int i = 0; i < 6; i++)
          if (i + j >= 6) e6 += longint'(pp6[j][i]) << (i + j);
      end
      ex6 = (k == 0) ? 7'h7f : 7'($urandom);
      for (int x = 0; x < 7; x++) e6 += longint'(ex6[x]) << 6;
      // keep the total inside the 12-bit result, as the replica always does
      if (e6 >= 4096) begin
        ex6[6] = 1'b0;
        e6 -= 64;
      end
      for (int j = 0; j < 4; j++) begin
        pp4[j] = 4'($urandom);
        for (int i = 0; i < 4; i++) e4 += longint'(pp4[j][i]) << (i + j);
      end
      for (int j = 0; j < 3; j++) begin
        pp3[j] = 3'($urandom);
        for (int i = 0; i < 3; i++) e3 += longint'(pp3[j][i]) << (i + j);
      end
      ex3 = 1'($urandom);
      e3 += longint'(ex3);
      #1;
      check("12x12", longint'({40'b0, s12}), e12);
      check("6x6 truncated", longint'({52'b0, s6}), e6);
      check("4x4", longint'({56'b0, s4}), e4);
      check("3x3 extra", longint'({58'b0, s3}), e3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
