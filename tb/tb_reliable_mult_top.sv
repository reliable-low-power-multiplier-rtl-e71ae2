// End-to-end testbench for reliable_mult_top at its default size. The 12 x 12
// reliable multiplier is run through reset, an error-free pass over operand pairs
// at the two ends of each operand-MSB range, and operations with random soft-error
// patterns on the main block's sampled output; each result is checked one clock
// later against an exact product and a replica model written here. The two 4 x 4
// example multipliers are checked on all 256 operand pairs alongside.
// Mechanisms that must each occur at least once: main result kept, replica result
// selected, a soft error small enough to be kept, the MICV-decided compensation
// unit added, and the ICV-only case (beta > 0).
module tb_reliable_mult_top;
  localparam longint TH_EXPECTED = 455553;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [11:0] a, b;
  logic [23:0] vos_err;
  logic [23:0] th, y, ya, yo;
  logic [11:0] yr;
  logic        err;
  logic [3:0]  ex_a, ex_b;
  logic [7:0]  ex_p;
  logic [3:0]  ex2_a, ex2_b;
  logic [7:0]  ex2_z;

  int checks = 0, failures = 0;
  int n_main = 0, n_replica = 0, n_masked = 0, n_comp = 0, n_icv = 0;

  reliable_mult_top dut (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .vos_err(vos_err),
    .th(th), .y(y), .ya(ya), .yo(yo), .yr(yr), .err(err),
    .ex_a(ex_a), .ex_b(ex_b), .ex_p(ex_p),
    .ex2_a(ex2_a), .ex2_b(ex2_b), .ex2_z(ex2_z)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // Replica model from the column sums of the 6 x 6 MSB array.
  function automatic longint replica(input int xh, input int yh, output bit c, output bit icv);
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
    c   = (beta == 0) && (alpha > 0);
    icv = beta > 0;
    return longint'((msp + ((beta + int'(c)) << 6)) >> 6);
  endfunction

  task automatic run_op(input logic [11:0] ta, input logic [11:0] tb_, input logic [23:0] te);
    longint exact, fw, yr_full, ya_exp, dd;
    bit     c, icv, e;
    a = ta;
    b = tb_;
    vos_err = te;
    @(posedge clk);
    #1;
    exact   = longint'({52'b0, ta}) * longint'({52'b0, tb_});
    fw      = replica(int'(ta[11:6]), int'(tb_[11:6]), c, icv);
    yr_full = fw << 18;
    ya_exp  = longint'({40'b0, 24'(exact) ^ te});
    dd      = ya_exp - yr_full;
    if (dd < 0) dd = -dd;
    e = dd > TH_EXPECTED;
    check("yo", longint'({40'b0, yo}), exact);
    check("ya", longint'({40'b0, ya}), ya_exp);
    check("yr", longint'({52'b0, yr}), fw << 6);
    check("err", longint'(err), longint'(e));
    check("y", longint'({40'b0, y}), e ? yr_full : ya_exp);
    if (c)   n_comp++;
    if (icv) n_icv++;
    if (e) n_replica++;
    else begin
      n_main++;
      if (te != 0) n_masked++;
    end
  endtask

  initial begin
    logic [23:0] e;
    rst_n = 1'b0;
    a = '0; b = '0; vos_err = '0; ex_a = '0; ex_b = '0; ex2_a = '0; ex2_b = '0;
    repeat (2) @(posedge clk);
    #1;
    check("y after reset", longint'({40'b0, y}), 0);
    rst_n = 1'b1;
    check("th", longint'({40'b0, th}), TH_EXPECTED);

    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++) begin
        ex_a  = 4'(x);
        ex_b  = 4'(z);
        ex2_a = 4'(z);
        ex2_b = 4'(x);
        #1;
        check("4x4 example", longint'({56'b0, ex_p}), longint'(x * z));
        check("4x4 two-stage example", longint'({56'b0, ex2_z}), longint'(x * z));
      end

    for (int xh = 0; xh < 64; xh += 3)
      for (int yh = 0; yh < 64; yh += 5) begin
        run_op({6'(xh), 6'h00}, {6'(yh), 6'h00}, '0);
        run_op({6'(xh), 6'h3f}, {6'(yh), 6'h3f}, '0);
      end

    for (int k = 0; k < 3000; k++) begin
      case (k % 3)
        0:       e = 24'(1) << $urandom_range(23, 0);
        1:       e = 24'(1) << $urandom_range(15, 0);
        default: e = 24'($urandom);
      endcase
      run_op(12'($urandom), 12'($urandom), e);
    end

    $display("main kept %0d, replica selected %0d, small soft errors kept %0d, MICV unit %0d, ICV only %0d",
             n_main, n_replica, n_masked, n_comp, n_icv);
    checks++;
    if (n_main == 0 || n_replica == 0 || n_masked == 0 || n_comp == 0 || n_icv == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
