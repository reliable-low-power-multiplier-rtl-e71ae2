// Self-checking testbench for error_correction at its default size (N = 12) with a
// threshold of 1000 chosen here. Random main-block and replica values are applied
// each cycle, chosen so that both outcomes occur; one clock later the registered
// copies, the distance, the flag and the selected output are compared with values
// computed here. Reset is checked to clear the registers.
module tb_error_correction;
  localparam int unsigned N  = 12;
  localparam logic [23:0] TH = 24'd1000;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [23:0] ya_in, ya_q, yr_full, d, y;
  logic [5:0]  yr_in, yr_q;
  logic        err;
  int checks = 0, failures = 0;
  int sel_main = 0, sel_rpr = 0;

  error_correction #(.N(N), .TH(TH)) dut (
    .clk(clk), .rst_n(rst_n), .ya_in(ya_in), .yr_in(yr_in),
    .ya_q(ya_q), .yr_q(yr_q), .yr_full(yr_full), .d(d), .err(err), .y(y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic [23:0] prev_ya;
    logic [5:0]  prev_yr;
    longint      full, dd;
    bit          e;
    rst_n = 1'b0;
    ya_in = 24'h123456;
    yr_in = 6'h2a;
    @(posedge clk);
    #1;
    check("ya_q after reset", ya_q, 0);
    check("yr_q after reset", yr_q, 0);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      prev_yr = 6'($urandom);
      full    = longint'({40'b0, prev_yr, 18'b0});
      // half the time stay close to the replica value, half the time anywhere
      if (k % 2 == 0) prev_ya = 24'(full + longint'($urandom_range(2 * 1100, 0)) - 1100);
      else            prev_ya = 24'($urandom);
      ya_in = prev_ya;
      yr_in = prev_yr;
      @(posedge clk);
      #1;
      // inputs changed after the edge must not show before the next edge
      ya_in = ~prev_ya;
      yr_in = ~prev_yr;
      #1;
      dd = longint'({40'b0, prev_ya}) - full;
      if (dd < 0) dd = -dd;
      e = dd > longint'(TH);
      check("ya_q", ya_q, prev_ya);
      check("yr_q", yr_q, prev_yr);
      check("yr_full", yr_full, full);
      check("d", d, dd);
      check("err", err, e);
      check("y", y, e ? full : longint'({40'b0, prev_ya}));
      if (e) sel_rpr++;
      else   sel_main++;
    end
    checks++;
    if (sel_rpr == 0 || sel_main == 0) begin
      failures++;
      $display("FAIL selection not exercised both ways");
    end
    $display("main selected %0d, replica selected %0d", sel_main, sel_rpr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
