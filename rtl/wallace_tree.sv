// Column-wise Wallace reduction of a partial-product array, with a ripple-carry
// final adder.
//
// Input is an N x N array of partial-product bits, pp[j][i] at weight 2^(i+j)
// (row j is the multiplicand gated by multiplier bit j), of which only the columns
// of weight >= KEEP_FROM are built, plus NEXTRA extra bits, all at weight
// 2^EXTRA_COL. The full array gives an exact multiplier; a truncated array with
// extra bits gives a fixed-width multiplier with compensation terms.
//
// Each reduction stage works on every column independently: the bits of a column
// are taken three at a time by full adders, a remaining pair goes to a half adder
// and a remaining single bit passes through. Sums stay in the column, carries go to
// the next column. Stages repeat until no column holds more than two bits; the two
// remaining rows are then added by the ripple-carry adder. Column heights of every
// stage are worked out at elaboration, so only adders that have live inputs exist.
// For a full 12 x 12 array the stages take the tallest column 12 -> 8 -> 6 -> 4 ->
// 3 -> 2.
//
// The total never reaches 2^(2N), so carries out of the top column are always zero
// and are dropped. Purely combinational.
// Follows the published description: full adders on three bits of equal weight,
// half adders, stage-wise reduction and a ripple-carry final adder. The column-wise
// schedule and its generic, elaboration-time construction are this design's own.
module wallace_tree #(
  parameter int unsigned N         = 12,
  parameter int unsigned KEEP_FROM = 0,
  parameter int unsigned NEXTRA    = 0,
  parameter int unsigned EXTRA_COL = 0
) (
  input  logic [N-1:0]   pp [N],
  input  logic [(NEXTRA > 0 ? NEXTRA : 1)-1:0] extra,
  output logic [2*N-1:0] sum
);
  localparam int W = 2 * N;

  // Bits in column c of the input array.
  function automatic int h0(int c);
    int h;
    h = 0;
    if (c >= int'(KEEP_FROM)) begin
      for (int j = 0; j < int'(N); j++) begin
        if (c - j >= 0 && c - j < int'(N)) h++;
      end
    end
    if (c == int'(EXTRA_COL)) h += int'(NEXTRA);
    return h;
  endfunction

  // Bits in column c after lvl reduction stages.
  function automatic int height(int lvl, int c);
    int h  [W];
    int hn [W];
    for (int k = 0; k < W; k++) h[k] = h0(k);
    for (int l = 0; l < lvl; l++) begin
      for (int k = 0; k < W; k++) begin
        hn[k] = h[k] / 3 + ((h[k] % 3 != 0) ? 1 : 0);
        if (k > 0) hn[k] += h[k-1] / 3 + ((h[k-1] % 3 == 2) ? 1 : 0);
      end
      h = hn;
    end
    return h[c];
  endfunction

  function automatic int max_height(int lvl);
    int m;
    m = 0;
    for (int k = 0; k < W; k++) if (height(lvl, k) > m) m = height(lvl, k);
    return m;
  endfunction

  function automatic int num_stages();
    int s;
    s = 0;
    while (max_height(s) > 2 && s < 64) s++;
    return s;
  endfunction

  // Position of pp[j][c-j] among the bits of column c (rows in order of j).
  function automatic int slot0(int c, int j);
    int k;
    k = 0;
    for (int jj = 0; jj < j; jj++) if (c - jj >= 0 && c - jj < int'(N)) k++;
    return k;
  endfunction

  localparam int STAGES = num_stages();
  localparam int HMAX   = (max_height(0) > 2) ? max_height(0) : 2;

  for (genvar s = 0; s <= STAGES; s++) begin : g_stage
    // col[c][k]: bit k of column c after s stages; slots above the height are 0.
    logic [HMAX-1:0] col [W];

    if (s == 0) begin : g_init
      for (genvar c = 0; c < W; c++) begin : g_col
        for (genvar j = 0; j < int'(N); j++) begin : g_row
          if (c >= int'(KEEP_FROM) && c - j >= 0 && c - j < int'(N)) begin : g_pp
            assign col[c][slot0(c, j)] = pp[j][c-j];
          end
        end
        if (c == int'(EXTRA_COL)) begin : g_extra
          for (genvar x = 0; x < int'(NEXTRA); x++) begin : g_x
            assign col[c][h0(c) - int'(NEXTRA) + x] = extra[x];
          end
        end
        for (genvar k = h0(c); k < HMAX; k++) begin : g_zero
          assign col[c][k] = 1'b0;
        end
      end
    end else begin : g_reduce
      for (genvar c = 0; c < W; c++) begin : g_col
        localparam int H    = height(s - 1, c);
        localparam int F    = H / 3;
        localparam int R    = H % 3;
        // first slot of this column that holds carries from column c-1
        localparam int BASE = F + ((R != 0) ? 1 : 0);

        for (genvar g = 0; g < F; g++) begin : g_fa
          logic co;
          full_adder u_fa (
            .a (g_stage[s-1].col[c][3*g]),
            .b (g_stage[s-1].col[c][3*g+1]),
            .ci(g_stage[s-1].col[c][3*g+2]),
            .s (col[c][g]),
            .co(co)
          );
          if (c + 1 < W) begin : g_carry
            localparam int HN   = height(s - 1, c + 1);
            localparam int BN   = HN / 3 + ((HN % 3 != 0) ? 1 : 0);
            assign col[c+1][BN + g] = co;
          end
        end

        if (R == 2) begin : g_ha
          logic co;
          half_adder u_ha (
            .a(g_stage[s-1].col[c][3*F]),
            .b(g_stage[s-1].col[c][3*F+1]),
            .s(col[c][F]),
            .c(co)
          );
          if (c + 1 < W) begin : g_carry
            localparam int HN   = height(s - 1, c + 1);
            localparam int BN   = HN / 3 + ((HN % 3 != 0) ? 1 : 0);
            assign col[c+1][BN + F] = co;
          end
        end else if (R == 1) begin : g_pass
          assign col[c][F] = g_stage[s-1].col[c][3*F];
        end

        for (genvar k = height(s, c); k < HMAX; k++) begin : g_zero
          assign col[c][k] = 1'b0;
        end
        // BASE marks where the carries from column c-1 start; they fill
        // slots BASE .. height(s, c) - 1.
        if (BASE > height(s, c)) begin : g_bad
          $error("wallace_tree: inconsistent column schedule");
        end
      end
    end
  end

  logic [W-1:0] row0;
  logic [W-1:0] row1;
  for (genvar c = 0; c < W; c++) begin : g_final
    assign row0[c] = g_stage[STAGES].col[c][0];
    assign row1[c] = g_stage[STAGES].col[c][1];
  end

  logic co_unused;
  rca #(.W(W)) u_rca (
    .a (row0),
    .b (row1),
    .ci(1'b0),
    .s (sum),
    .co(co_unused)
  );
endmodule
