// Self-checking testbench for wallace4x4_two_stage: all 256 operand pairs, checked
// against the integer product a * b.
module tb_wallace4x4_two_stage;
  logic [3:0] a, b;
  logic [7:0] z;
  int checks = 0, failures = 0;

  wallace4x4_two_stage dut (.a(a), .b(b), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int w = 0; w < 16; w++) begin
        a = 4'(x);
        b = 4'(w);
        #1;
        checks++;
        if (z !== 8'(x * w)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, w, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
