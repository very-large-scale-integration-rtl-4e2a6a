// tb_abs_module: the module calculator is driven with the two's-complement
// difference and borrow of random unsigned operand pairs (and of equal,
// extreme and one-apart pairs), and its output is compared with |a - b|.
module tb_abs_module;
  localparam int NB = 16;
  logic [NB-1:0] diff, mag;
  logic          neg;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  abs_module #(.NB(NB)) dut (.diff, .neg, .mag);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int a, b, e;
      case (it % 5)
        0: begin a = 0;      b = 65535;  end
        1: begin a = 65535;  b = 0;      end
        2: begin a = int'($urandom % 65536); b = a; end
        3: begin a = int'($urandom % 65535); b = a + 1; end
        default: begin a = int'($urandom % 65536); b = int'($urandom % 65536); end
      endcase
      diff = NB'(a - b);
      neg  = (a < b);
      e    = (a < b) ? b - a : a - b;
      @(posedge clk);
      checks++;
      if (int'(mag) != e) begin
        failures++;
        $display("FAIL a=%0d b=%0d got %0d expected %0d", a, b, mag, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
