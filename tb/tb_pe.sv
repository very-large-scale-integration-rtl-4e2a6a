// tb_pe: one processing element at its default sizes (NB = 16, K = 4,
// H = 4). Operand pairs are streamed back to back, one group per cycle, so
// the output steps of pair p overlap the collection of pair p+1. The control
// word is driven as the control unit would: groups in cycles pH..pH+H-1,
// ld_pc in cycle (p+1)H, output steps s = 0..H-1 in cycles (p+1)H+1+s. Every
// output step is compared with the reference group partial result of
// |xe - xb|, and the H steps combined (Y = 2^-K Y + P) must give the square.
module tb_pe;
  import ssd_pkg::*;
  import ssd_ref_pkg::*;
  localparam int NB = 16, K = 4, H = NB / K, P = 600;
  logic clk = 0, rst_n = 0;
  pe_ctrl_t ctrl;
  logic [1:0]    grp_sel;
  logic [K-1:0]  xe_grp, xb_grp;
  logic [2*NB:0] pkg;
  logic [NB-1:0] xe [P], xb [P];
  int checks = 0, failures = 0;

  pe #(.NB(NB), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned y, a;
    for (int p = 0; p < P; p++) begin
      case (p % 4)
        0: begin xe[p] = NB'($urandom); xb[p] = NB'($urandom); end
        1: begin xe[p] = '0; xb[p] = '1; end        // largest negative
        2: begin xe[p] = NB'($urandom); xb[p] = xe[p]; end
        default: begin xe[p] = NB'($urandom); xb[p] = NB'($urandom); end
      endcase
    end
    ctrl = '0; grp_sel = '0; xe_grp = '0; xb_grp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    y = 0;
    for (int c = 0; c < (P + 2) * H; c++) begin
      int q, pp, s;
      @(negedge clk);
      // input side
      ctrl.grp_en    = (c < P * H);
      ctrl.grp_first = (c % H == 0);
      xe_grp = (c < P * H) ? xe[c / H][(c % H) * K +: K] : '0;
      xb_grp = (c < P * H) ? xb[c / H][(c % H) * K +: K] : '0;
      ctrl.ld_pc = (c >= H) && (c % H == 0) && (c / H <= P);
      // output side
      q = c - H - 1;
      pp = (q >= 0) ? q / H : -1;
      s  = (q >= 0) ? q % H : 0;
      grp_sel = 2'(s);
      #1;
      if (pp >= 0 && pp < P) begin
        a = (xe[pp] >= xb[pp]) ? longint'(xe[pp] - xb[pp]) : longint'(xb[pp] - xe[pp]);
        checks++;
        if (longint'(pkg) != group_psq(a, s, NB, K)) begin
          failures++;
          $display("FAIL pair %0d step %0d got %0h expected %0h", pp, s, pkg,
                   group_psq(a, s, NB, K));
        end
        y = (s == 0) ? longint'(pkg) : (y >> K) + longint'(pkg);
        if (s == H - 1) begin
          checks++;
          if (y != a * a) begin
            failures++;
            $display("FAIL pair %0d square got %0d expected %0d", pp, y, a * a);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
