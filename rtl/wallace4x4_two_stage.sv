// 4 x 4 unsigned Wallace multiplier in two reduction stages and a final adder.
//
// The second worked instance of the scheme, arranged so that every column reaches
// at most two bits after two stages (operands x = a, y = b, x_i y_j = a[i] & b[j]):
//   stage 1  half adders on the two tallest columns:
//            HA3 (x1y2, x0y3) in column 3, HA4 (x2y2, x1y3) in column 4
//   stage 2  full adders on columns 2 to 5:
//            FA2 (x1y1, x0y2, x2y0), FA3 (s3, x3y0, x2y1),
//            FA4 (s4, x3y1, c3),     FA5 (x3y2, x2y3, c4)
//   final    a 6-bit ripple-carry adder over columns 1 to 6 adds the two rows
//            {x3y3, FA5.s, FA4.s, FA3.s, FA2.s, x0y1} and
//            {FA5.c, FA4.c, FA3.c, FA2.c, 0, x1y0}; its carry out is z7.
// z0 = x0y0. Purely combinational.
// Follows the published diagram for the adder types, their stages and the product
// labels z0 to z7; the pairing of bits inside a column is this design's reading of
// the drawn lines (any pairing within a column gives the same product).
module wallace4x4_two_stage (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] z
);
  logic [3:0] x;
  logic [3:0] y;
  assign x = a;
  assign y = b;

  logic s3, c3, s4, c4;
  logic fs2, fc2, fs3, fc3, fs4, fc4, fs5, fc5;

  half_adder u_ha3 (.a(x[1] & y[2]), .b(x[0] & y[3]), .s(s3), .c(c3));
  half_adder u_ha4 (.a(x[2] & y[2]), .b(x[1] & y[3]), .s(s4), .c(c4));

  full_adder u_fa2 (.a(x[1] & y[1]), .b(x[0] & y[2]), .ci(x[2] & y[0]), .s(fs2), .co(fc2));
  full_adder u_fa3 (.a(s3),          .b(x[3] & y[0]), .ci(x[2] & y[1]), .s(fs3), .co(fc3));
  full_adder u_fa4 (.a(s4),          .b(x[3] & y[1]), .ci(c3),          .s(fs4), .co(fc4));
  full_adder u_fa5 (.a(x[3] & y[2]), .b(x[2] & y[3]), .ci(c4),          .s(fs5), .co(fc5));

  logic [5:0] row_s;
  logic [5:0] row_c;
  assign row_s = {x[3] & y[3], fs5, fs4, fs3, fs2, x[0] & y[1]};
  assign row_c = {fc5, fc4, fc3, fc2, 1'b0, x[1] & y[0]};

  rca #(.W(6)) u_final (.a(row_s), .b(row_c), .ci(1'b0), .s(z[6:1]), .co(z[7]));

  assign z[0] = x[0] & y[0];
endmodule
