// Self-checking testbench for wallace4x4: all 256 operand pairs, checked against
// the integer product a * b.
module tb_wallace4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  wallace4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int z = 0; z < 16; z++) begin
        a = 4'(x);
        b = 4'(z);
        #1;
        checks++;
        if (p !== 8'(x * z)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", x, z, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
