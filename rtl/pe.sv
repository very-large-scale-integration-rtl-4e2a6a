// pe: processing element PE_j. It receives one operand pair (Xe_j, Xb_j)
// group-serially, K bits of each per cycle, least significant group first,
// and afterwards gives, one group per cycle, the group partial results of
// squaring P_jKg of |Xe_j - Xb_j|. Inside: the group subtractor with its
// borrow trigger and group registers Rg1..RgH, the module calculator OM, the
// converter PC with the partial-square formers and the K-input adder BSmk.
// Collection of the next pair overlaps the H output steps of the current
// one, so a new pair can enter every H cycles.
// Timing, with cycle 0 the first group of a pair (ctrl.grp_en, grp_first):
//   cycles 0..H-1  groups enter the subtractor (ctrl.grp_en)
//   cycle  H       OM reads Rg/Tr, PC loads |dX| (ctrl.ld_pc)
//   cycles H+1..2H pkg shows P_jKg for grp_sel = 0..H-1 (combinational)
// The structure follows the source's processing element; the timing above
// is this design's reading of it.
module pe
  import ssd_pkg::*;
#(
  parameter int unsigned NB = N_BITS_DEF,
  parameter int unsigned K  = K_DEF,
  localparam int unsigned H  = NB / K,
  localparam int unsigned GW = (H > 1) ? $clog2(H) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pe_ctrl_t        ctrl,
  input  logic [GW-1:0]   grp_sel,
  input  logic [K-1:0]    xe_grp,
  input  logic [K-1:0]    xb_grp,
  output logic [2*NB:0]   pkg
);

  logic [NB-1:0] diff, mag;
  logic          borrow;

  group_subtractor #(.NB(NB), .K(K)) u_sub (
    .clk, .rst_n,
    .grp_en    (ctrl.grp_en),
    .grp_first (ctrl.grp_first),
    .xe_grp, .xb_grp,
    .diff, .borrow
  );

  abs_module #(.NB(NB)) u_om (
    .diff, .neg(borrow), .mag
  );

  group_square_former #(.NB(NB), .K(K)) u_fp (
    .clk, .rst_n,
    .ld      (ctrl.ld_pc),
    .mag_in  (mag),
    .grp_sel,
    .pkg
  );

endmodule
