// group_square_former: converter PC, partial-square formers F P_g1..F P_gK
// and the K-input adder BSmk of a processing element. PC is a register that
// takes the magnitude |dX| (ld) and presents it group by group: step grp_sel
// = s selects the bits of group s, counted from the least significant group
// (s = 0) upwards. For the r-th bit of the group, taken from the group's
// highest bit (r = 1) down, the former F P_gr builds the partial square
//   P_gr = x_i AND (0.x_1 x_2 ... x_(i-1) 0 1),
// x_1 being the most significant bit of |dX|: the bits above x_i followed by
// "01", or zero when x_i is 0. BSmk adds the K partial squares, the r-th
// shifted right by r-1 places, giving the group partial result of squaring
//   P_Kg = sum_r 2^-(r-1) P_gr   (value below 2).
// Fixed point: every P_gr and the output pkg carry 2*NB fraction bits, so
// pkg = P_Kg * 2^(2*NB) exactly; pkg has one integer bit (2*NB+1 bits).
// The groups are weighted against each other later, in the device's Y
// accumulator (Y = 2^-K Y + P_M, least significant group first, so that after
// the last group Y = |dX|^2 as an integer). The algorithm is the
// source's; the fixed-point scaling, the least-significant-group-first order
// and the register in PC are this design's choices. pkg is combinational
// from the PC register and grp_sel.
module group_square_former #(
  parameter int unsigned NB = ssd_pkg::N_BITS_DEF,
  parameter int unsigned K  = ssd_pkg::K_DEF,
  localparam int unsigned H  = NB / K,
  localparam int unsigned GW = (H > 1) ? $clog2(H) : 1,
  localparam int unsigned FW = 2 * NB          // fraction bits of P_gr
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld,
  input  logic [NB-1:0] mag_in,
  input  logic [GW-1:0] grp_sel,
  output logic [FW:0]   pkg
);

  logic [NB-1:0]       pc;          // PC register: |dX|
  logic [K-1:0][FW-1:0] ps;         // F P_gr outputs, already shifted by r-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pc <= '0;
    else if (ld) pc <= mag_in;
  end

  // Formers F P_g1..F P_gK.
  always_comb begin
    for (int unsigned r = 1; r <= K; r++) begin
      int unsigned b;                 // bit position of x_i in pc (0 = LSB)
      logic [FW-1:0] hi, word;
      b    = int'(grp_sel) * K + (K - r);
      // Bits of pc above b, placed as the fraction bits before x_i.
      hi   = FW'(pc) & ~((FW'(1) << (b + 1)) - FW'(1));
      word = (hi << NB) | (FW'(1) << (NB + b - 1));
      ps[r-1] = (b < NB && pc[b]) ? (word >> (r - 1)) : '0;
    end
  end

  // BSmk: K-input adder.
  multi_input_adder #(.M(K), .WI(FW), .WO(FW + 1)) u_bsmk (
    .op  (ps),
    .sum (pkg)
  );

endmodule
