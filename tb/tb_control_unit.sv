// tb_control_unit: in_valid is driven with random idle cycles and with long
// unbroken runs. A model in the testbench counts groups itself, notes the
// cycle t of every last group, and expects: grp_first on the first group of
// each set, ld_pc in cycle t+1, pm_en with grp_sel = 0..H-1 in cycles
// t+2..t+H+1, and acc_en in cycles t+3..t+H+2 with acc_first on the first
// and acc_last on the last of them. Every output is compared every cycle.
module tb_control_unit;
  import ssd_pkg::*;
  localparam int H = 4, CYC = 20000;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pe_ctrl_t ctrl;
  logic [1:0] grp_sel;
  logic pm_en, acc_en, acc_first, acc_last;
  bit last [CYC];
  int checks = 0, failures = 0;

  control_unit #(.H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input int c, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s got %0d expected %0d", c, tag, got, exp);
    end
  endtask

  initial begin
    int cnt = 0;
    int overlaps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < CYC; c++) begin
      bit e_pm, e_acc, e_first, e_last;
      int e_sel;
      @(negedge clk);
      // long unbroken runs in the middle, random gaps elsewhere
      in_valid = ((c / 2000) % 2 == 1) ? 1'b1 : ($urandom % 10 < 6);
      last[c] = in_valid && (cnt == H - 1);
      e_pm = 0; e_acc = 0; e_first = 0; e_last = 0; e_sel = -1;
      for (int t = c - H - 2; t <= c - 2; t++) begin
        if (t >= 0 && last[t]) begin
          if (c - t - 2 <= H - 1) begin e_pm = 1; e_sel = c - t - 2; end
          if (c - t - 3 >= 0) begin
            e_acc = 1;
            e_first = (c - t - 3 == 0);
            e_last  = (c - t - 3 == H - 1);
          end
        end
      end
      if (e_pm && c >= 1 && last[c - 1]) overlaps++;
      #1;
      chk("grp_en", c, ctrl.grp_en, in_valid);
      chk("grp_first", c, ctrl.grp_first, cnt == 0);
      chk("ld_pc", c, ctrl.ld_pc, (c >= 1) ? last[c - 1] : 0);
      chk("pm_en", c, pm_en, e_pm);
      if (e_pm) chk("grp_sel", c, grp_sel, e_sel);
      chk("acc_en", c, acc_en, e_acc);
      if (e_acc) begin
        chk("acc_first", c, acc_first, e_first);
        chk("acc_last", c, acc_last, e_last);
      end
      if (in_valid) cnt = (cnt == H - 1) ? 0 : cnt + 1;
    end
    checks++;
    if (overlaps == 0) begin
      failures++;
      $display("FAIL no load of PC overlapped an output step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
