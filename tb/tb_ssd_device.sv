// tb_ssd_device: end-to-end test of the whole device at its default sizes
// (N = 7 pairs of 16-bit operands, groups of K = 4 bits, H = 4 groups).
// Sets of operand pairs are streamed in, one group of every operand per
// cycle, least significant group first. Phases: continuous streaming (a new
// set every H cycles, so collection overlaps computation), streaming with
// random idle cycles, and corner sets (all differences zero; all pairs
// 0 - 0xFFFF, the largest possible sum; borrows rippling across every group).
// For every set the testbench computes sum_j (xe_j - xb_j)^2 itself and
// checks y when y_valid rises, that y_valid comes exactly H+3 cycles after
// the set's last group (2H+2 after its first group when there are no idle
// cycles), and that under continuous input results come every H cycles.
// It counts how often each mechanism occurred (negative difference, borrow
// across groups, overlapped collection, idle input cycle, largest result)
// and counts a failure for any that never did.
module tb_ssd_device;
  import ssd_pkg::*;
  localparam int N = N_PE_DEF, NB = N_BITS_DEF, K = K_DEF, H = NB / K;
  localparam int NSETS = 3000;
  localparam int YW = 2 * NB + 1 + $clog2(N) + 1;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [N-1:0][K-1:0] xe_grp = '0, xb_grp = '0;
  logic [YW-1:0] y;
  logic y_valid;

  logic [NB-1:0]   xe [NSETS][N], xb [NSETS][N];
  longint unsigned yref [NSETS];
  int              t_last [NSETS];     // cycle of each set's last group
  int              t_first [NSETS];    // cycle of each set's first group
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_out = 0;
  int prev_out = -1;
  int n_neg = 0, n_ripple = 0, n_overlap = 0, n_idle = 0, n_max = 0, n_zero = 0;
  int n_rate = 0;

  ssd_device dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (NSETS * H * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %0d", tag, got, exp);
    end
  endtask

  // Input monitor: time stamps of the first and last group of every set.
  int n_in_grp = 0;
  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      int p, g;
      p = n_in_grp / H;
      g = n_in_grp % H;
      if (g == 0) t_first[p] = cyc;
      if (g == H - 1) t_last[p] = cyc;
      // groups of set p enter while set p-1 is still being computed
      if (p > 0 && cyc - t_last[p - 1] <= H + 2) n_overlap++;
      n_in_grp++;
    end
  end

  // Output monitor: sets leave in order.
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      if (n_out >= NSETS) begin
        failures++;
        $display("FAIL extra result");
      end else begin
        chk($sformatf("y of set %0d", n_out), longint'(y), longint'(yref[n_out]));
        chk($sformatf("latency of set %0d", n_out), cyc - t_last[n_out], H + 3);
        if (t_last[n_out] - t_first[n_out] == H - 1)
          chk("latency from first group", cyc - t_first[n_out], 2 * H + 2);
        if (n_out > 0 && t_first[n_out] - t_first[n_out - 1] == H &&
            t_last[n_out] - t_last[n_out - 1] == H) begin
          chk("result spacing", cyc - prev_out, H);
          n_rate++;
        end
        if (yref[n_out] == longint'(N) * 65535 * 65535) n_max++;
        if (yref[n_out] == 0) n_zero++;
        prev_out = cyc;
        n_out++;
      end
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, n);
    end
  endtask

  initial begin
    // Build the sets and their reference sums.
    for (int p = 0; p < NSETS; p++) begin
      yref[p] = 0;
      for (int j = 0; j < N; j++) begin
        longint d;
        case (p % 10)
          3: begin xe[p][j] = 16'h0000; xb[p][j] = 16'hFFFF; end
          4: begin xe[p][j] = NB'($urandom); xb[p][j] = xe[p][j]; end
          5: begin xe[p][j] = 16'h1000; xb[p][j] = NB'(1 + j); end
          default: begin xe[p][j] = NB'($urandom); xb[p][j] = NB'($urandom); end
        endcase
        d = longint'(xe[p][j]) - longint'(xb[p][j]);
        if (d < 0) n_neg++;
        if (xe[p][j][K-1:0] < xb[p][j][K-1:0] && xe[p][j] > xb[p][j]) n_ripple++;
        yref[p] += longint'(d * d);
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < NSETS; p++) begin
      // first third: continuous; then random idle cycles; last part continuous
      bit gaps;
      gaps = (p >= NSETS / 3) && (p < 2 * NSETS / 3);
      for (int g = 0; g < H; g++) begin
        if (gaps) begin
          while ($urandom % 4 == 0) begin
            in_valid <= 0;
            n_idle++;
            @(posedge clk);
          end
        end
        in_valid <= 1;
        for (int j = 0; j < N; j++) begin
          xe_grp[j] <= xe[p][j][g*K +: K];
          xb_grp[j] <= xb[p][j][g*K +: K];
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (3 * H + 5) @(posedge clk);
    chk("number of results", n_out, NSETS);
    need("negative differences (borrow out)", n_neg);
    need("borrows rippling into a higher group", n_ripple);
    need("groups entering during computation of the previous set", n_overlap);
    need("idle input cycles", n_idle);
    need("largest possible result", n_max);
    need("zero result", n_zero);
    need("results at the full rate of one per H cycles", n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
