// half_adder: adds two bits of equal weight. s is the sum bit (same
// weight), c the carry (next weight). Purely combinational.
// A standard cell used by the compressors and the Wallace tree.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
