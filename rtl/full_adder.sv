// Full adder: the 3:2 counter that the Wallace reduction is built from. It takes
// three bits of the same weight and returns their sum bit s (same weight) and carry
// co (next weight). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
