// Main block: N x N unsigned Wallace-tree multiplier.
//
// Partial products are plain AND terms, pp[j][i] = a[i] & b[j] at weight 2^(i+j).
// The full array is reduced column by column by a Wallace tree of full and half
// adders and the last two rows are added by a ripple-carry adder, giving the exact
// 2N-bit product. Purely combinational; in the reliable multiplier this is the
// block that runs at a scaled supply voltage, so its output is registered by the
// error-correction stage.
// Follows the published design: AND partial products, 12 x 12, Wallace reduction.
// Unsigned operands are this design's reading; no signed version is specified.
module wallace_mult #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0] pp [N];

  for (genvar j = 0; j < N; j++) begin : g_pp
    assign pp[j] = a & {N{b[j]}};
  end

  wallace_tree #(.N(N), .KEEP_FROM(0), .NEXTRA(0)) u_tree (
    .pp   (pp),
    .extra(1'b0),
    .sum  (p)
  );
endmodule
