// tb_group_subtractor: operand pairs are fed group-serially, least
// significant group first, back to back and with idle cycles in between.
// After the last group of each pair the registered difference must equal
// (xe - xb) mod 2^NB and the borrow must equal (xe < xb). Pairs that need a
// borrow across every group boundary (e.g. 0x1000 - 0x0001) are included.
module tb_group_subtractor;
  localparam int NB = 16, K = 4, H = NB / K;
  logic clk = 0, rst_n = 0;
  logic grp_en = 0, grp_first = 0;
  logic [K-1:0] xe_grp = '0, xb_grp = '0;
  logic [NB-1:0] diff;
  logic borrow;
  int checks = 0, failures = 0;

  group_subtractor #(.NB(NB), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int it = 0; it < 2000; it++) begin
      logic [NB-1:0] a, b;
      case (it % 4)
        0: begin a = 16'h1000; b = 16'h0001; end
        1: begin a = NB'($urandom); b = a; end
        default: begin a = NB'($urandom); b = NB'($urandom); end
      endcase
      for (int g = 0; g < H; g++) begin
        grp_en    <= 1;
        grp_first <= (g == 0);
        xe_grp    <= a[g*K +: K];
        xb_grp    <= b[g*K +: K];
        @(posedge clk);
      end
      grp_en <= 0;
      #1;
      checks += 2;
      if (diff != NB'(a - b)) begin
        failures++;
        $display("FAIL diff a=%h b=%h got %h expected %h", a, b, diff, NB'(a - b));
      end
      if (borrow != (a < b)) begin
        failures++;
        $display("FAIL borrow a=%h b=%h got %0d", a, b, borrow);
      end
      if (it % 3 == 0) repeat (1 + $urandom % 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
