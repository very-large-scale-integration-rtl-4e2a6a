// control_unit: control unit BK of the device. It counts the incoming groups
// (in_valid marks a cycle that carries one K-bit group of every operand), and
// broadcasts to all processing elements the control word: grp_en, grp_first
// for the least significant group, ld_pc one cycle after the last (H-th)
// group, and the group step grp_sel = 0..H-1 on the H cycles after ld_pc. It also times the output side: pm_en loads the macro-partial
// result register RgPMg on every output step, and one cycle later acc_en,
// acc_first (first group: RgY starts from zero, Y_0 = 0) and acc_last (last
// group: Y is complete) drive the adder SmY and register RgY.
// in_valid may drop between groups; a new pair may start right after the
// last group of the previous one, i.e. every H cycles, since the H output
// steps of one pair overlap collection of the next. The source names the
// unit and shows which registers it drives; the sequence is this design's.
module control_unit
  import ssd_pkg::*;
#(
  parameter int unsigned H  = ssd_pkg::N_BITS_DEF / ssd_pkg::K_DEF,
  localparam int unsigned GW = (H > 1) ? $clog2(H) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output pe_ctrl_t      ctrl,
  output logic [GW-1:0] grp_sel,
  output logic          pm_en,
  output logic          acc_en,
  output logic          acc_first,
  output logic          acc_last
);

  logic [GW-1:0] in_cnt;    // index of the next input group
  logic [GW-1:0] out_cnt;   // output group step
  logic          out_act;
  logic          ld_q;
  logic          last_in;

  assign last_in = in_valid && (in_cnt == GW'(H - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      ld_q      <= 1'b0;
      out_act   <= 1'b0;
      out_cnt   <= '0;
      acc_en    <= 1'b0;
      acc_first <= 1'b0;
      acc_last  <= 1'b0;
    end else begin
      if (in_valid) in_cnt <= last_in ? '0 : in_cnt + GW'(1);
      ld_q <= last_in;
      if (ld_q) begin
        out_act <= 1'b1;
        out_cnt <= '0;
      end else if (out_act) begin
        if (out_cnt == GW'(H - 1)) out_act <= 1'b0;
        else                       out_cnt <= out_cnt + GW'(1);
      end
      acc_en    <= out_act;
      acc_first <= out_act && (out_cnt == '0);
      acc_last  <= out_act && (out_cnt == GW'(H - 1));
    end
  end

  always_comb begin
    ctrl.grp_en    = in_valid;
    ctrl.grp_first = (in_cnt == '0);
    ctrl.ld_pc     = ld_q;
  end
  assign grp_sel = out_cnt;
  assign pm_en   = out_act;

  // A load of PC can only come after the previous H output steps are done
  // or in the cycle of the last one.
  a_ld_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    ld_q |-> (!out_act || out_cnt == GW'(H - 1)));
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
    (int'(in_cnt) < int'(H)) && (int'(out_cnt) < int'(H)));

endmodule
