// counter7: seven-input single-bit multi-input adder. It adds the seven
// one-bit inputs C1..C7, all of the same weight, and gives the count 0..7 as
// the three bits S0 (weight 1), S1 (weight 2) and P0 (weight 4). The port
// names and the seven-input/three-output shape follow the simulated adder
// model of the source; which output carries which weight is this design's
// reading (S for the sum rows, P for the carry row of the three-to-two code
// transformation). Inside, four unlinked full adders are arranged as a
// Wallace tree: two adders compress C1..C6, a third adds their sums and C7,
// a fourth adds the three carries. Combinational, three full-adder delays.
module counter7 (
  input  logic C1,
  input  logic C2,
  input  logic C3,
  input  logic C4,
  input  logic C5,
  input  logic C6,
  input  logic C7,
  output logic S0,
  output logic S1,
  output logic P0
);
  logic sa, ca, sb, cb, cc;

  full_adder u_fa_a (.a(C1), .b(C2), .c(C3), .s(sa), .co(ca));
  full_adder u_fa_b (.a(C4), .b(C5), .c(C6), .s(sb), .co(cb));
  full_adder u_fa_c (.a(sa), .b(sb), .c(C7), .s(S0), .co(cc));
  full_adder u_fa_d (.a(ca), .b(cb), .c(cc), .s(S1), .co(P0));
endmodule
