// ssm_full_adder: (3,2) counter of the Dadda reduction tree and cell of the
// final ripple-carry adder. Adds three bits of equal weight and returns a sum
// bit of the same weight and a carry of twice the weight. Purely combinational.
module ssm_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
