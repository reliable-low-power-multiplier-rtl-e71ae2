// End-to-end testbench for mul12 at its default size (12 x 12, 6-bit replica,
// default threshold). It checks:
//   - th equals 455553 = max |a*b - replica| over all inputs, worked out
//     independently of the RTL, and is reached by the sweep below;
//   - with no soft errors, for all 4096 operand-MSB pairs with low bits all zero
//     and all one: yo = ya = y = a*b, err = 0, and yr matches a replica model
//     written here (ICV injection plus the MICV-decided extra unit);
//   - with random soft-error patterns on the main block's sampled output: ya, err
//     and y follow the selection rule, and the corrected y is always within 2*th
//     of the exact product;
//   - latency: outputs change exactly one clock after the inputs;
//   - reset clears the registered outputs.
// Mechanisms that must each occur at least once: main result kept, replica
// result selected, soft error small enough to be kept, compensation unit added.
module tb_mul12;
  localparam longint TH_EXPECTED = 455553;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] a, b;
  logic [23:0] vos_err;
  logic [23:0] th, y, ya, yo;
  logic [11:0] yr;
  logic        err;

  int checks = 0, failures = 0;
  int n_main = 0, n_replica = 0, n_masked = 0, n_comp = 0;
  longint max_dist = 0;

  mul12 dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .vos_err(vos_err),
    .th(th), .y(y), .ya(ya), .yo(yo), .yr(yr), .err(err)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=%0d b=%0d vos_err=%h)",
               what, got, exp, a, b, vos_err);
    end
  endtask

  function automatic longint zext24(input logic [23:0] v);
    return longint'({40'b0, v});
  endfunction

  // Replica model: 6 x 6 column sums of the operand MSBs.
  function automatic longint replica(input int xh, input int yh, output bit c);
    int msp, beta, alpha, col;
    msp = 0; beta = 0; alpha = 0;
    for (int k = 0; k < 11; k++) begin
      col = 0;
      for (int j = 0; j < 6; j++)
        if (k - j >= 0 && k - j < 6) col += ((xh >> (k - j)) & 1) * ((yh >> j) & 1);
      if (k >= 6)      msp += col << k;
      else if (k == 5) beta = col;
      else if (k == 4) alpha = col;
    end
    c = (beta == 0) && (alpha > 0);
    return longint'((msp + ((beta + int'(c)) << 6)) >> 6);
  endfunction

  // Apply one operation, wait for the clock edge and check every output.
  task automatic run_op(input logic [11:0] ta, input logic [11:0] tb_, input logic [23:0] te);
    longint exact, yr_full, ya_exp, dd, y_exp, fw, lim;
    bit     c, e;
    a = ta;
    b = tb_;
    vos_err = te;
    #1;
    @(posedge clk);
    #1;
    exact   = longint'(ta) * longint'(tb_);
    fw      = replica(int'(ta[11:6]), int'(tb_[11:6]), c);
    yr_full = fw << 18;
    ya_exp  = zext24(24'(exact) ^ te);
    dd      = ya_exp - yr_full;
    if (dd < 0) dd = -dd;
    e       = dd > TH_EXPECTED;
    y_exp   = e ? yr_full : ya_exp;
    check("yo", zext24(yo), exact);
    check("ya", zext24(ya), ya_exp);
    check("yr", longint'({52'b0, yr}), fw << 6);
    check("err", longint'(err), longint'(e));
    check("y", zext24(y), y_exp);
    lim = exact - zext24(y);
    if (lim < 0) lim = -lim;
    checks++;
    if (lim > 2 * TH_EXPECTED) begin
      failures++;
      $display("FAIL corrected output too far from exact: %0d", lim);
    end
    if (te == 0) begin
      dd = exact - yr_full;
      if (dd < 0) dd = -dd;
      if (dd > max_dist) max_dist = dd;
    end
    if (c) n_comp++;
    if (e) n_replica++;
    else begin
      n_main++;
      if (te != 0) n_masked++;
    end
  endtask

  initial begin
    logic [23:0] e;
    logic [23:0] y_hold;
    rst_n   = 1'b0;
    a       = 12'hfff;
    b       = 12'hfff;
    vos_err = '0;
    repeat (2) @(posedge clk);
    #1;
    check("y after reset", zext24(y), 0);
    check("yo after reset", zext24(yo), 0);
    check("yr after reset", longint'({52'b0, yr}), 0);
    rst_n = 1'b1;
    check("th", zext24(th), TH_EXPECTED);

    // latency: new inputs must not reach y before the next rising edge
    a = 12'd100; b = 12'd200;
    @(posedge clk);
    #1;
    y_hold = y;
    a = 12'd3000; b = 12'd4000;
    #3;
    check("y holds between edges", zext24(y), zext24(y_hold));
    @(posedge clk);
    #1;
    check("y one edge later", zext24(y), 3000 * 4000);

    // error-free sweep over all operand-MSB pairs
    for (int xh = 0; xh < 64; xh++)
      for (int yh = 0; yh < 64; yh++) begin
        run_op({6'(xh), 6'h00}, {6'(yh), 6'h00}, '0);
        run_op({6'(xh), 6'h3f}, {6'(yh), 6'h3f}, '0);
      end
    check("largest error-free distance equals th", max_dist, TH_EXPECTED);

    // soft errors: single-bit, two-bit and random patterns
    for (int k = 0; k < 6000; k++) begin
      case (k % 3)
        0:       e = 24'(1) << $urandom_range(23, 0);
        1:       e = (24'(1) << $urandom_range(23, 0)) | (24'(1) << $urandom_range(23, 0));
        default: e = 24'($urandom);
      endcase
      run_op(12'($urandom), 12'($urandom), e);
    end

    $display("main kept %0d, replica selected %0d, small soft errors kept %0d, compensation added %0d",
             n_main, n_replica, n_masked, n_comp);
    checks++;
    if (n_main == 0 || n_replica == 0 || n_masked == 0 || n_comp == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
