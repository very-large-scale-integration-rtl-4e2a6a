// abs_module: difference module calculator OM|dX|. It takes the NB-bit
// two's-complement difference held in the group registers together with the
// final borrow (1 when Xe < Xb) and returns the magnitude |Xe - Xb| as an
// NB-bit unsigned number: the difference itself when the borrow is 0, its
// two's complement when it is 1. The function is the source's; building it
// as a conditional negation is this design's choice. Combinational.
module abs_module #(
  parameter int unsigned NB = ssd_pkg::N_BITS_DEF
) (
  input  logic [NB-1:0] diff,
  input  logic          neg,
  output logic [NB-1:0] mag
);
  always_comb begin
    if (neg) mag = ~diff + NB'(1);
    else     mag = diff;
  end
endmodule
