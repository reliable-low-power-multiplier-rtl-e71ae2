// Half adder: the two-input cell of the Wallace reduction stages (HA in the
// reduction diagrams). s = a xor b, c = a and b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
