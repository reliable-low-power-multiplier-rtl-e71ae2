// Self-checking testbench for fixed_width_rpr at its default size (12-bit operands,
// 6-bit replica). Every one of the 4096 pairs of operand MSBs is applied, with random
// low bits that the replica must ignore. The expected fixed-width product is worked
// out here from the partial-product columns: the sum of all terms of weight >= 2^6,
// plus beta units of weight 2^6 (beta = set terms of weight 2^5), plus one more unit
// of 2^6 when beta = 0 and some term of weight 2^4 is set, taken from 2^6 up. The
// comparison is made on integers, so a result that would not fit 6 bits fails.
// The compensation flag is checked too, and both of its values must occur.
module tb_fixed_width_rpr;
  localparam int H = 6;
  logic [11:0] a, b;
  logic [5:0]  yr_fw;
  logic        comp;
  int checks = 0, failures = 0;
  int comp_seen = 0, nocomp_seen = 0;

  fixed_width_rpr dut (.a(a), .b(b), .yr_fw(yr_fw), .comp(comp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int msp, beta, alpha, expect_fw;
    bit expect_comp;
    for (int xh = 0; xh < 64; xh++) begin
      for (int yh = 0; yh < 64; yh++) begin
        msp = 0; beta = 0; alpha = 0;
        for (int k = 0; k < 2 * H - 1; k++) begin
          int col;
          col = 0;
          for (int j = 0; j < H; j++) begin
            if (k - j >= 0 && k - j < H) col += ((xh >> (k - j)) & 1) * ((yh >> j) & 1);
          end
          if (k >= H)          msp += col << k;
          else if (k == H - 1) beta = col;
          else if (k == H - 2) alpha = col;
        end
        expect_comp = (beta == 0) && (alpha > 0);
        expect_fw   = (msp + ((beta + int'(expect_comp)) << H)) >> H;
        a = {6'(xh), 6'($urandom)};
        b = {6'(yh), 6'($urandom)};
        #1;
        checks++;
        if (int'(yr_fw) != expect_fw || comp !== expect_comp) begin
          failures++;
          $display("FAIL xh=%0d yh=%0d -> fw=%0d comp=%0d, expected %0d %0d",
                   xh, yh, yr_fw, comp, expect_fw, expect_comp);
        end
        if (comp) comp_seen++;
        else      nocomp_seen++;
      end
    end
    checks++;
    if (comp_seen == 0 || nocomp_seen == 0) begin
      failures++;
      $display("FAIL compensation cases not both exercised");
    end
    $display("compensation added in %0d of 4096 MSB pairs", comp_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
