// ssd_device: device for parallel vertical group computing of the sum of
// squared differences y = sum_j (Xe_j - Xb_j)^2 over N operand pairs of NB
// bits (unsigned), the structure with parallel forming and serial summing of
// the macro-partial results. Each cycle with in_valid high brings one K-bit
// group of every operand, least significant group first; H = NB/K such
// cycles bring a whole set of pairs. N processing elements work in parallel
// and, for each of the H groups in turn, give the group partial results of
// squaring P_jKg; the N-input adder BS adds them into the macro-partial
// result P_Mg, which is registered in RgPMg; the adder SmY and register RgY
// accumulate Y_g = 2^-K Y_(g-1) + P_Mg. The control unit BK sequences it all.
// Timing: with the first group of a set in cycle 0, y_valid is high in cycle
// 2H+2 and y holds the exact integer sum (width 2*NB + 2 + ceil(log2 N)).
// A new set may start every H cycles (collection of one set overlaps the
// computation of the previous one), so under a continuous stream one result
// comes out every H cycles.
// The block structure is the source's; sizes, the fixed-point scaling, the
// control sequence and the handshake-free streaming interface are this
// design's choices.
module ssd_device
  import ssd_pkg::*;
#(
  parameter int unsigned N  = N_PE_DEF,
  parameter int unsigned NB = N_BITS_DEF,
  parameter int unsigned K  = K_DEF,
  localparam int unsigned H   = NB / K,
  localparam int unsigned GW  = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned PKW = 2 * NB + 1,                  // P_jKg width
  localparam int unsigned PMW = PKW + ((N > 1) ? $clog2(N) : 0), // P_Mg width
  localparam int unsigned YW  = PMW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][K-1:0] xe_grp,
  input  logic [N-1:0][K-1:0] xb_grp,
  output logic [YW-1:0]       y,
  output logic                y_valid
);

  pe_ctrl_t              ctrl;
  logic [GW-1:0]         grp_sel;
  logic                  pm_en, acc_en, acc_first, acc_last;
  logic [N-1:0][PKW-1:0] pkg;      // P_1Kg .. P_NKg
  logic [PMW-1:0]        pmg;      // P_Mg

  control_unit #(.H(H)) u_bk (
    .clk, .rst_n, .in_valid,
    .ctrl, .grp_sel, .pm_en, .acc_en, .acc_first, .acc_last
  );

  for (genvar j = 0; j < N; j++) begin : g_pe
    pe #(.NB(NB), .K(K)) u_pe (
      .clk, .rst_n, .ctrl, .grp_sel,
      .xe_grp (xe_grp[j]),
      .xb_grp (xb_grp[j]),
      .pkg    (pkg[j])
    );
  end

  // BS: N-input adder forming P_Mg.
  multi_input_adder #(.M(N), .WI(PKW), .WO(PMW)) u_bs (
    .op  (pkg),
    .sum (pmg)
  );

  y_accumulator #(.K(K), .PMW(PMW)) u_acc (
    .clk, .rst_n, .pm_en,
    .pm_in (pmg),
    .acc_en, .acc_first, .acc_last,
    .y, .y_valid
  );

endmodule
