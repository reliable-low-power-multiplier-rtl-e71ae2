// 4 x 4 unsigned Wallace multiplier, wired cell by cell.
//
// A small worked instance of the Wallace scheme with a ripple-carry final stage.
// Cells are numbered by column and stage:
//   stage 1: HA6 (a0b1, a1b0), FA7 (a0b2, a1b1, a2b0), FA8 (a1b2, a2b1, a3b0),
//            HA9 (a2b2, a3b1)
//   stage 2: HA10 (c6, s7), FA11 (c7, s8, a0b3), FA13 (c8, s9, a1b3),
//            FA15 (c9, a2b3, a3b2)
//   final ripple-carry stage: HA17 (c10, s11), FA18 (c17, c11, s13),
//            FA19 (c18, c13, s15), FA20 (c19, c15, a3b3)
// Product bits: p0 = a0b0, p1 = s6, p2 = s10, p3 = s17, p4 = s18, p5 = s19,
// p6 = s20, p7 = c20. Purely combinational.
// Follows the published 4 x 4 diagram cell for cell; three printed input labels
// that would repeat a partial product are read as a1b1 (FA7), a3b1 (HA9) and
// a3b2 (FA15), as the column weights require.
module wallace4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] pp [4];  // pp[i][j] = a[i] & b[j]
  for (genvar i = 0; i < 4; i++) begin : g_i
    for (genvar j = 0; j < 4; j++) begin : g_j
      assign pp[i][j] = a[i] & b[j];
    end
  end

  logic s6, c6, s7, c7, s8, c8, s9, c9;
  logic s10, c10, s11, c11, s13, c13, s15, c15;
  logic s17, c17, s18, c18, s19, c19, s20, c20;

  half_adder u6  (.a(pp[0][1]), .b(pp[1][0]),               .s(s6),  .c(c6));
  full_adder u7  (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s7),  .co(c7));
  full_adder u8  (.a(pp[1][2]), .b(pp[2][1]), .ci(pp[3][0]), .s(s8),  .co(c8));
  half_adder u9  (.a(pp[2][2]), .b(pp[3][1]),               .s(s9),  .c(c9));

  half_adder u10 (.a(c6),       .b(s7),                     .s(s10), .c(c10));
  full_adder u11 (.a(c7),       .b(s8),       .ci(pp[0][3]), .s(s11), .co(c11));
  full_adder u13 (.a(c8),       .b(s9),       .ci(pp[1][3]), .s(s13), .co(c13));
  full_adder u15 (.a(c9),       .b(pp[2][3]), .ci(pp[3][2]), .s(s15), .co(c15));

  half_adder u17 (.a(c10),      .b(s11),                    .s(s17), .c(c17));
  full_adder u18 (.a(c17),      .b(c11),      .ci(s13),     .s(s18), .co(c18));
  full_adder u19 (.a(c18),      .b(c13),      .ci(s15),     .s(s19), .co(c19));
  full_adder u20 (.a(c19),      .b(c15),      .ci(pp[3][3]), .s(s20), .co(c20));

  assign p = {c20, s20, s19, s18, s17, s10, s6, pp[0][0]};
endmodule
