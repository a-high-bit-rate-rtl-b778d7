// ssm_half_adder: (2,2) counter of the Dadda reduction tree. Adds two bits of
// equal weight into a sum bit and a carry bit of twice the weight. Purely
// combinational.
module ssm_half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
