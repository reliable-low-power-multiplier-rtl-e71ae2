// Reliable low-power 12 x 12 multiplier with a Wallace-tree reduced-precision replica.
//
// Main block: an exact N x N Wallace multiplier meant to run below its critical
// supply voltage (voltage overscaling), where its longest paths may miss the sample
// edge. Replica: a fixed-width Wallace multiplier on the N/2 operand MSBs with
// ICV/MICV truncation compensation, short enough to stay correct. Error correction:
// both results are registered, and the main result is replaced by the replica's
// whenever the two differ by more than th, the largest distance an error-free
// product can have from the replica.
//
// Timing faults are not something RTL simulation can produce, so the main block's
// sampled output is modelled as ya = yo ^ vos_err: yo is the error-free product,
// and each set bit of vos_err flips the corresponding sampled bit. Tie vos_err to
// zero for normal use.
//
// Ports (all outputs registered, one clock after a, b and vos_err are applied):
//   a, b     N-bit unsigned operands
//   vos_err  2N-bit soft-error pattern applied to the main block's sampled output
//   y        corrected 2N-bit product
//   ya       main-block product as sampled (with soft errors)
//   yo       error-free main-block product
//   yr       replica product on the N-bit scale of a[N-1:N/2] * b[N-1:N/2]
//            (its N/2 low bits are always zero: the replica is fixed-width)
//   th       threshold in use (a constant)
//   err      1 when y was taken from the replica
// rst_n is an active-low synchronous reset.
// Follows the published design: main block, replica, registers, |ya - yr| > Th
// selection, port names and widths. This design's own choices: the vos_err input
// that models timing errors, clk/rst_n/err ports, and Th computed at elaboration.
module mul12 #(
  parameter int unsigned    N  = mul_pkg::N_DEF,
  parameter logic [2*N-1:0] TH = (2*N)'(mul_pkg::compute_th(N))
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
  output logic             err
);
  localparam int unsigned H = N / 2;

  logic [2*N-1:0] p_main;
  logic [H-1:0]   yr_fw;
  logic           rpr_comp;
  logic [H-1:0]   yr_q;
  logic [2*N-1:0] yr_full;
  logic [2*N-1:0] diff_mag;

  wallace_mult #(.N(N)) m1 (.a(a), .b(b), .p(p_main));

  fixed_width_rpr #(.N(N)) e1 (.a(a), .b(b), .yr_fw(yr_fw), .comp(rpr_comp));

  error_correction #(.N(N), .TH(TH)) c1 (
    .clk    (clk),
    .rst_n  (rst_n),
    .ya_in  (p_main ^ vos_err),
    .yr_in  (yr_fw),
    .ya_q   (ya),
    .yr_q   (yr_q),
    .yr_full(yr_full),
    .d      (diff_mag),
    .err    (err),
    .y      (y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) yo <= '0;
    else        yo <= p_main;
  end

  assign yr = {yr_q, {H{1'b0}}};
  assign th = TH;
endmodule
