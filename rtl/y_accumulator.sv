// y_accumulator: register RgPMg, adder SmY and register RgY of the device.
// RgPMg takes the macro-partial result P_Mg from the N-input adder when
// pm_en is high. On each acc_en cycle SmY adds the registered P_Mg to the
// contents of RgY shifted right by K places (the feedback "R k"):
//   Y_g = 2^-K Y_(g-1) + P_Mg,  Y_0 = 0 (acc_first).
// P_Mg carries 2*NB fraction bits (it is the value times 2^(2*NB)), and the
// groups come least significant first, so the bits shifted out are always
// zero and after the last group (acc_last) RgY holds the sum of squared
// differences as an exact integer; y_valid is high for that one cycle.
// Register widths: PMW for P_Mg, PMW+1 for Y (the running value stays below
// 2^K/(2^K-1) times the largest P_Mg). The recurrence and the three
// registers follow the source; the fixed-point scaling, the widths and the
// group order are this design's choices.
module y_accumulator #(
  parameter int unsigned K   = ssd_pkg::K_DEF,
  parameter int unsigned PMW = 2 * ssd_pkg::N_BITS_DEF + 1 + $clog2(ssd_pkg::N_PE_DEF),
  localparam int unsigned YW = PMW + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           pm_en,
  input  logic [PMW-1:0] pm_in,
  input  logic           acc_en,
  input  logic           acc_first,
  input  logic           acc_last,
  output logic [YW-1:0]  y,
  output logic           y_valid
);

  logic [PMW-1:0] rg_pm;   // RgPMg
  logic [YW-1:0]  rg_y;    // RgY
  logic [YW-1:0]  sm_y;    // SmY output

  assign sm_y = (acc_first ? '0 : (rg_y >> K)) + YW'(rg_pm);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg_pm   <= '0;
      rg_y    <= '0;
      y_valid <= 1'b0;
    end else begin
      if (pm_en)  rg_pm <= pm_in;
      if (acc_en) rg_y  <= sm_y;
      y_valid <= acc_en && acc_last;
    end
  end

  assign y = rg_y;

  // The right shift must never drop a one: the method is exact.
  a_exact_shift: assert property (@(posedge clk) disable iff (!rst_n)
    (acc_en && !acc_first) |-> (rg_y[K-1:0] == '0));

endmodule
