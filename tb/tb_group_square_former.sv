// tb_group_square_former: loads random magnitudes (and 0, 1, all ones) into
// PC and steps grp_sel through all groups. Each output must equal the
// reference group partial result from ssd_ref_pkg, and the H outputs
// combined as Y = 2^-K Y + P (least significant group first) must give
// |dX|^2 exactly. Run at the default sizes and at NB = 8, K = 2.
module tb_group_square_former;
  import ssd_ref_pkg::*;
  localparam int NB = 16, K = 4, H = NB / K;
  localparam int NB2 = 8, K2 = 2, H2 = NB2 / K2;
  logic clk = 0, rst_n = 0;
  logic ld = 0;
  logic [NB-1:0]  mag_in = '0;
  logic [1:0]     grp_sel = '0;
  logic [2*NB:0]  pkg;
  logic [NB2-1:0] mag_in2 = '0;
  logic [2*NB2:0] pkg2;
  int checks = 0, failures = 0;

  group_square_former #(.NB(NB),  .K(K))  dut  (.clk, .rst_n, .ld, .mag_in,
                                               .grp_sel, .pkg);
  group_square_former #(.NB(NB2), .K(K2)) dut2 (.clk, .rst_n, .ld,
                                               .mag_in(mag_in2), .grp_sel,
                                               .pkg(pkg2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint unsigned got,
                     input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h", tag, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 1500; it++) begin
      longint unsigned a, a2, y, y2;
      case (it % 5)
        0: a = 0;
        1: a = 1;
        2: a = 64'hFFFF;
        default: a = longint'($urandom % 65536);
      endcase
      a2 = longint'($urandom % 256);
      ld <= 1; mag_in <= NB'(a); mag_in2 <= NB2'(a2);
      @(posedge clk);
      ld <= 0;
      y = 0; y2 = 0;
      for (int s = 0; s < H; s++) begin
        grp_sel <= 2'(s);
        @(posedge clk);
        chk($sformatf("a=%0h s=%0d", a, s), longint'(pkg), group_psq(a, s, NB, K));
        chk($sformatf("a2=%0h s=%0d", a2, s), longint'(pkg2), group_psq(a2, s, NB2, K2));
        y  = (y >> K) + longint'(pkg);
        y2 = (y2 >> K2) + longint'(pkg2);
      end
      chk("square", y, a * a);
      chk("square2", y2, a2 * a2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
