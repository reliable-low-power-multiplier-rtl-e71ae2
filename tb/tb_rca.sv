// Self-checking testbench for rca at its default width (24 bits): corner cases
// (all ones, carry through every cell) and 5000 random operand pairs, checked
// against the integer sum a + b + ci = {co, s}.
module tb_rca;
  localparam int unsigned W = 24;
  logic [W-1:0] a, b, s;
  logic ci, co;
  int checks = 0, failures = 0;

  rca dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tci);
    longint unsigned expect_sum;
    a  = ta;
    b  = tb_;
    ci = tci;
    #1;
    expect_sum = longint'(ta) + longint'(tb_) + longint'(tci);
    checks++;
    if ({co, s} !== (W+1)'(expect_sum)) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %0d %h", ta, tb_, tci, co, s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 24'd1, 1'b0);
    apply(24'h555555, 24'haaaaaa, 1'b1);
    for (int k = 0; k < 5000; k++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
