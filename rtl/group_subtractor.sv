// group_subtractor: input stage of a processing element. The operands Xe and
// Xb arrive group-serially, K bits of each per cycle, least significant group
// first. Each cycle with grp_en high a K-bit subtractor forms
// xe_grp - xb_grp - borrow, the borrow coming from the trigger Tr (forced to
// zero on the first group, grp_first). The K-bit difference is shifted into
// the group registers Rg1..RgH, so that after H = NB/K groups they hold the
// whole NB-bit difference (two's complement, modulo 2^NB) and Tr holds the
// final borrow, which is the sign of Xe - Xb for unsigned operands.
// Interface: diff and borrow are register outputs, valid from the cycle after
// the last group until the next group is shifted in. Reset clears Tr and the
// registers (the reset itself is this design's choice). Group-serial input,
// the subtractor, Tr and the chain Rg1..RgH follow the source; placing the
// newest group at the top of the chain is this design's choice.
module group_subtractor #(
  parameter int unsigned NB = ssd_pkg::N_BITS_DEF,
  parameter int unsigned K  = ssd_pkg::K_DEF,
  localparam int unsigned H = NB / K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          grp_en,
  input  logic          grp_first,
  input  logic [K-1:0]  xe_grp,
  input  logic [K-1:0]  xb_grp,
  output logic [NB-1:0] diff,
  output logic          borrow
);

  logic [H-1:0][K-1:0] rg;        // Rg1..RgH, rg[0] least significant group
  logic                tr;        // borrow trigger Tr
  logic                bin;
  logic [K:0]          d_ext;     // {borrow out, difference}

  assign bin   = grp_first ? 1'b0 : tr;
  assign d_ext = {1'b0, xe_grp} - {1'b0, xb_grp} - (K+1)'(bin);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tr <= 1'b0;
      rg <= '0;
    end else if (grp_en) begin
      tr <= d_ext[K];
      for (int unsigned i = 0; i + 1 < H; i++) rg[i] <= rg[i+1];
      rg[H-1] <= d_ext[K-1:0];
    end
  end

  assign diff   = rg;
  assign borrow = tr;

  initial assert (NB % K == 0) else $error("NB must be a multiple of K");

endmodule
