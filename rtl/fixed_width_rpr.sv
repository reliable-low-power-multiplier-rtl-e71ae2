// Reduced-precision replica (RPR): fixed-width Wallace multiplier with truncation
// compensation.
//
// The replica multiplies only the H = N/2 most significant bits of each operand,
// xh = a[N-1:H] and yh = b[N-1:H], and keeps only the H most significant bits of the
// 2H-bit product (a fixed-width result). Its short carry chain keeps it correct when
// the main block fails under voltage overscaling.
//
// The H x H partial-product array is split by column weight k = i + j:
//   MSP   k >= H     built and summed
//   ICV   k == H-1   beta  = number of set terms
//   MICV  k == H-2   alpha = number of set terms
//   LSP   k <  H-2   dropped
// Measured against the full-length product, the average truncation error is close
// to beta output LSBs (weight 2^H) when beta > 0, and to beta + 1 when beta = 0 and
// the MICV column is not empty. So each ICV term is injected as one unit into the
// LSB column of the MSP (no logic needed: the AND terms are simply wired there), and
// one more unit is injected when beta = 0 and alpha > 0 (a NOR and an OR, off the
// critical path). Every MSP term and the H + 1 compensation bits go through the
// same Wallace reduction as the main block; the fixed-width result is taken from
// weight 2^H up. The sum never exceeds 2^(2H) - 2^H (4032 for the default H = 6,
// checked exhaustively for H = 2 to 8), so the 2H-bit tree loses nothing.
//
// Ports: a, b full-width operands; yr_fw is the fixed-width product, weight 2^(2N-H)
// in the full-precision product; comp shows that the extra MICV unit was added.
// Purely combinational.
// Follows the published design: 6-bit replica on the operand MSBs, the MSP / ICV /
// MICV / LSP split, error about beta (beta + 1 when beta = 0), Wallace reduction.
// This design's own choices: beta counted in output LSBs and the alpha > 0
// condition for the extra unit, both fixed from the error statistics.
module fixed_width_rpr #(
  parameter int unsigned N = 12
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [N/2-1:0] yr_fw,
  output logic           comp
);
  localparam int unsigned H = N / 2;

  logic [H-1:0]   xh;
  logic [H-1:0]   yh;
  logic [H-1:0]   pp [H];
  logic [H-1:0]   icv;
  logic [H-2:0]   micv;
  logic [2*H-1:0] sum;

  assign xh = a[N-1:N-H];
  assign yh = b[N-1:N-H];

  for (genvar j = 0; j < H; j++) begin : g_pp
    assign pp[j]  = xh & {H{yh[j]}};
    assign icv[j] = pp[j][H-1-j];
  end

  for (genvar j = 0; j < H - 1; j++) begin : g_micv
    assign micv[j] = pp[j][H-2-j];
  end

  assign comp = ~(|icv) & (|micv);

  // Only the MSP columns (weight >= 2^H) are built from the array; the ICV terms
  // and the MICV-decided unit join the MSP's least significant column.
  wallace_tree #(.N(H), .KEEP_FROM(H), .NEXTRA(H + 1), .EXTRA_COL(H)) u_tree (
    .pp   (pp),
    .extra({comp, icv}),
    .sum  (sum)
  );

  assign yr_fw = sum[2*H-1:H];
endmodule
