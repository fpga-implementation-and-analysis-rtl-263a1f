// des_add_key: the key mixing step of the DES f-function, the bitwise XOR of
// the expanded 48-bit right half with the 48-bit round sub-key. Combinational.
module des_add_key (
  input  logic [47:0] e,
  input  logic [47:0] k,
  output logic [47:0] x
);
  assign x = e ^ k;
endmodule
