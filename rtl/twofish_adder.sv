// twofish_adder: one-bit full adder, the cell from which the 32-bit
// modulo-2^32 adders of the Twofish data path are chained. Combinational.
module twofish_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));
endmodule
