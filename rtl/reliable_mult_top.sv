// Top level: the reliable 12 x 12 Wallace multiplier with its reduced-precision
// replica (mul12), and beside it the two 4 x 4 Wallace multipliers that show the
// reduction scheme cell by cell (wallace4x4 and wallace4x4_two_stage). The three
// are independent; each has its own ports. See mul12 for the multiplier's ports
// and timing; the 4 x 4 multipliers are purely combinational
// (ex_p = ex_a * ex_b, ex2_z = ex2_a * ex2_b).
module reliable_mult_top #(
  parameter int unsigned N = mul_pkg::N_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  input  logic [2*N-1:0]   vos_err,
  output logic [2*N-1:0]   th,
  output logic [2*N-1:0]   y,
  output logic [2*N-1:0]   ya,
  output logic [2*N-1:0]   yo,
  output logic [N-1:0]     yr,
  output logic             err,
  input  logic [3:0]       ex_a,
  input  logic [3:0]       ex_b,
  output logic [7:0]       ex_p,
  input  logic [3:0]       ex2_a,
  input  logic [3:0]       ex2_b,
  output logic [7:0]       ex2_z
);
  mul12 #(.N(N)) u_mul12 (
    .clk(clk), .rst_n(rst_n), .a(a), .b(b), .vos_err(vos_err),
    .th(th), .y(y), .ya(ya), .yo(yo), .yr(yr), .err(err)
  );

  wallace4x4 u_ex4 (.a(ex_a), .b(ex_b), .p(ex_p));

  wallace4x4_two_stage u_ex4b (.a(ex2_a), .b(ex2_b), .z(ex2_z));
endmodule
