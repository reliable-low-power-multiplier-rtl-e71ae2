// Ripple-carry adder: W full adders chained so that each carry out feeds the carry
// in of the next, more significant cell. It is the final carry-propagate adder of the
// Wallace trees, which leave two rows to be added. Purely combinational; the delay
// grows linearly with W.
// Follows the published description of the final ripple-carry stage.
module rca #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[W];
endmodule
