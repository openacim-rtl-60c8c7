// full_adder: one-bit full adder, sum = a ^ b ^ ci, co = majority(a, b, ci).
// It is the building block of the exact 4-2 compressor. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  always_comb begin
    sum = a ^ b ^ ci;
    co  = (a & b) | (a & ci) | (b & ci);
  end
endmodule
