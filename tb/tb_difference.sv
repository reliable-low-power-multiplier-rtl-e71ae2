// Self-checking testbench for difference at 24 bits: ya above, below and equal to
// yr, distances exactly at, one below and one above the threshold, and random
// values. Expected distance and flag are computed with integer arithmetic.
module tb_difference;
  logic [23:0] ya, yr, th, d;
  logic        err;
  int checks = 0, failures = 0;

  difference dut (.ya(ya), .yr(yr), .th(th), .d(d), .err(err));

  task automatic apply(input logic [23:0] ta, input logic [23:0] tr, input logic [23:0] tt);
    longint dist_exp;
    ya = ta;
    yr = tr;
    th = tt;
    #1;
    dist_exp = longint'(ta) - longint'(tr);
    if (dist_exp < 0) dist_exp = -dist_exp;
    checks++;
    if (d !== 24'(dist_exp) || err !== (dist_exp > longint'(tt))) begin
      failures++;
      $display("FAIL ya=%0d yr=%0d th=%0d -> d=%0d err=%0d", ta, tr, tt, d, err);
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
    apply(24'd100, 24'd100, 24'd0);
    apply(24'd101, 24'd100, 24'd0);
    apply(24'd100, 24'd101, 24'd0);
    apply(24'd5000, 24'd1000, 24'd4000);
    apply(24'd5000, 24'd1000, 24'd3999);
    apply(24'd1000, 24'd5000, 24'd4000);
    apply(24'd1000, 24'd5000, 24'd3999);
    apply(24'hffffff, 24'd0, 24'hfffffe);
    apply(24'd0, 24'hffffff, 24'hffffff);
    for (int k = 0; k < 5000; k++) apply(24'($urandom), 24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
