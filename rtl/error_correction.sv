// Error-correction stage: output registers, difference detector and output mux.
//
// On each rising clk edge the main-block product ya_in and the replica's
// fixed-width product yr_in are captured (the registers at the right of the two
// multipliers). From the registered values the replica product is aligned to the
// full 2N-bit scale, yr_full = yr_q * 2^(2N-H), compared with ya_q, and the output is
//   y = ya_q       when |ya_q - yr_full| <= TH
//   y = yr_full    when |ya_q - yr_full| >  TH   (err = 1)
// so a large soft error in the main block is replaced by the coarse but correct
// replica value. y, err and the registered copies follow one clock after the inputs.
// rst_n is an active-low synchronous reset that clears both registers.
// Follows the published design: registers on both results, the |.| > Th test and
// the output multiplexer. This design's own choices: synchronous active-low reset
// and the computed default for TH.
module error_correction #(
  parameter int unsigned     N  = 12,
  parameter logic [2*N-1:0]  TH = (2*N)'(mul_pkg::compute_th(N))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2*N-1:0]   ya_in,
  input  logic [N/2-1:0]   yr_in,
  output logic [2*N-1:0]   ya_q,
  output logic [N/2-1:0]   yr_q,
  output logic [2*N-1:0]   yr_full,
  output logic [2*N-1:0]   d,
  output logic             err,
  output logic [2*N-1:0]   y
);
  localparam int unsigned H = N / 2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      ya_q <= ya_in;
      yr_q <= yr_in;
    end
  end

  assign yr_full = {yr_q, {(2*N-H){1'b0}}};

  difference #(.W(2*N)) u_diff (
    .ya (ya_q),
    .yr (yr_full),
    .th (TH),
    .d  (d),
    .err(err)
  );

  assign y = err ? yr_full : ya_q;
endmodule
