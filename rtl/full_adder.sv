// full_adder: single-bit adder (three inputs of equal weight -> sum bit and
// carry bit of double weight). It is the element from which the seven-input
// counter is built as a Wallace tree. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ c;
  assign co = (a & b) | (a & c) | (b & c);
endmodule
