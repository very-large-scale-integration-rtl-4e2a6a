// ssd_stream_check: stimulus and checker for one ssd_device at the sizes
// given by its parameters. It streams NSETS sets of N operand pairs (first
// third back to back, middle third with random idle cycles, last third back
// to back; every tenth set all 0 - max, every tenth set all-equal pairs),
// compares each y with sum_j (xe_j - xb_j)^2 computed here, checks that
// y_valid comes H+3 cycles after each set's last group and that back-to-back
// sets give one result every H cycles. It raises done when finished and
// reports its counts on checks and failures.
module ssd_stream_check #(
  parameter int N = 5,
  parameter int NB = 12,
  parameter int K = 3,
  parameter int NSETS = 600
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int H  = NB / K;
  localparam int YW = 2 * NB + 1 + ((N > 1) ? $clog2(N) : 0) + 1;

  logic in_valid = 0;
  logic [N-1:0][K-1:0] xe_grp = '0, xb_grp = '0;
  logic [YW-1:0] y;
  logic y_valid;
  logic [NB-1:0]   xe [NSETS][N], xb [NSETS][N];
  longint unsigned yref [NSETS];
  int t_last [NSETS], t_first [NSETS];
  int cyc = 0, n_out = 0, prev_out = -1, n_in_grp = 0;
  int n_max = 0, n_rate = 0, n_idle = 0;
  longint unsigned ymax;

  ssd_device #(.N(N), .NB(NB), .K(K)) dut (.*);

  initial begin checks = 0; failures = 0; done = 0; end

  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d NB=%0d K=%0d %s got %0d expected %0d",
                                  N, NB, K, tag, got, exp);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && in_valid) begin
      int p, g;
      p = n_in_grp / H;
      g = n_in_grp % H;
      if (g == 0) t_first[p] = cyc;
      if (g == H - 1) t_last[p] = cyc;
      n_in_grp++;
    end
    if (rst_n && y_valid) begin
      if (n_out >= NSETS) chk("extra result", 1, 0);
      else begin
        chk($sformatf("y of set %0d", n_out), longint'(y), longint'(yref[n_out]));
        chk("latency", cyc - t_last[n_out], H + 3);
        if (n_out > 0 && t_last[n_out] - t_last[n_out - 1] == H &&
            t_first[n_out] - t_first[n_out - 1] == H) begin
          chk("result spacing", cyc - prev_out, H);
          n_rate++;
        end
        if (yref[n_out] == ymax) n_max++;
        prev_out = cyc;
        n_out++;
      end
    end
  end

  initial begin
    ymax = longint'(N) * ((64'd1 << NB) - 1) * ((64'd1 << NB) - 1);
    for (int p = 0; p < NSETS; p++) begin
      yref[p] = 0;
      for (int j = 0; j < N; j++) begin
        longint d;
        case (p % 10)
          3: begin xe[p][j] = '0; xb[p][j] = '1; end
          4: begin xe[p][j] = NB'($urandom); xb[p][j] = xe[p][j]; end
          default: begin xe[p][j] = NB'($urandom); xb[p][j] = NB'($urandom); end
        endcase
        d = longint'(xe[p][j]) - longint'(xb[p][j]);
        yref[p] += longint'(d * d);
      end
    end
    @(posedge rst_n);
    @(posedge clk);
    for (int p = 0; p < NSETS; p++) begin
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
    chk("largest result seen", n_max > 0, 1);
    chk("full-rate results seen", n_rate > 0, 1);
    chk("idle cycles seen", n_idle > 0, 1);
    done = 1;
  end
endmodule
