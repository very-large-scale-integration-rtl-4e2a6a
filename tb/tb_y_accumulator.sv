// tb_y_accumulator: sets of H macro-partial results are streamed through
// RgPMg into RgY, back to back, as the control unit times them: pm_en in
// cycle pH+s, acc_en one cycle later, acc_first on s = 0, acc_last on
// s = H-1. The values are random but, like real P_Mg, value s is a multiple
// of 2^(K(H-1-s)), so the shifts are exact; the expected result is
// sum_s P_s / 2^(K(H-1-s)). y_valid and y are checked in every cycle.
module tb_y_accumulator;
  localparam int K = 4, H = 4, PMW = 36, YW = PMW + 1, P = 800;
  logic clk = 0, rst_n = 0;
  logic pm_en = 0, acc_en = 0, acc_first = 0, acc_last = 0;
  logic [PMW-1:0] pm_in = '0;
  logic [YW-1:0]  y;
  logic           y_valid;
  longint unsigned v [P][H];
  longint unsigned yref [P];
  int checks = 0, failures = 0;

  y_accumulator #(.K(K), .PMW(PMW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < P; p++) begin
      yref[p] = 0;
      for (int s = 0; s < H; s++) begin
        longint unsigned r;
        int sh;
        sh = K * (H - 1 - s);
        r = {$urandom, $urandom};
        if (p % 5 == 0) r = '1;                        // largest values
        r = r & ((64'd1 << (PMW - sh)) - 1);
        v[p][s] = r << sh;
        yref[p] += r;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < P * H + 3; c++) begin
      int q;
      @(negedge clk);
      // y_valid / y for the set whose last accumulation was in cycle c-1
      q = c - 2;
      #1;
      checks++;
      if (y_valid != (q >= 0 && q % H == H - 1 && q / H < P)) begin
        failures++;
        $display("FAIL cycle %0d y_valid=%0d", c, y_valid);
      end
      if (q >= 0 && q % H == H - 1 && q / H < P) begin
        checks++;
        if (longint'(y) != yref[q / H]) begin
          failures++;
          $display("FAIL set %0d y=%0h expected %0h", q / H, y, yref[q / H]);
        end
      end
      pm_en = (c < P * H);
      pm_in = (c < P * H) ? PMW'(v[c / H][c % H]) : '0;
      q = c - 1;
      acc_en    = (q >= 0 && q / H < P);
      acc_first = (q >= 0 && q % H == 0);
      acc_last  = (q >= 0 && q % H == H - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
