// Self-checking testbench for wallace_mult. The default 12 x 12 multiplier gets
// corner operands (0, 1, all ones, alternating bits, single bits) and 20000 random
// pairs; a 4 x 4 instance is checked exhaustively. Expected values are integer
// products.
module tb_wallace_mult;
  logic [11:0] a, b;
  logic [23:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  wallace_mult dut (.a(a), .b(b), .p(p));
  wallace_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  task automatic apply(input logic [11:0] ta, input logic [11:0] tb_);
    a = ta;
    b = tb_;
    #1;
    checks++;
    if (p !== 24'(int'(ta) * int'(tb_))) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d", ta, tb_, p);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] corner [6];
    corner = '{12'd0, 12'd1, 12'hfff, 12'haaa, 12'h555, 12'h800};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int s = 0; s < 12; s++) apply(12'(1 << s), 12'hfff);
    for (int k = 0; k < 20000; k++) apply(12'($urandom), 12'($urandom));
    for (int x = 0; x < 16; x++) begin
      for (int z = 0; z < 16; z++) begin
        a4 = 4'(x);
        b4 = 4'(z);
        #1;
        checks++;
        if (p4 !== 8'(x * z)) begin
          failures++;
          $display("FAIL 4x4 %0d * %0d -> %0d", x, z, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
