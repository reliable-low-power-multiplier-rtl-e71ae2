// Difference detector of the error-correction stage.
//
// Computes the distance d = |ya - yr| between the main-block product and the
// replica product (both at full 2N-bit scale) and raises err when d > th, i.e. when
// the main block's output is too far from the replica to be explained by the
// replica's own truncation error. Purely combinational.
// Follows the published selection rule (replace only when strictly above Th).
module difference #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] ya,
  input  logic [W-1:0] yr,
  input  logic [W-1:0] th,
  output logic [W-1:0] d,
  output logic         err
);
  always_comb begin
    if (ya >= yr) d = ya - yr;
    else          d = yr - ya;
  end
  assign err = (d > th);
endmodule
