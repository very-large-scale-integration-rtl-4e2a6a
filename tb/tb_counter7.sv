// tb_counter7: exhaustive check of the seven-input single-bit adder. All 128
// input combinations are applied (C7 changing fastest, as a binary count)
// and {P0,S1,S0} is compared with the number of ones among C1..C7.
module tb_counter7;
  logic [6:0] c;
  logic s0, s1, p0;
  int checks = 0, failures = 0;
  logic clk = 0;

  counter7 dut (
    .C1(c[6]), .C2(c[5]), .C3(c[4]), .C4(c[3]), .C5(c[2]), .C6(c[1]), .C7(c[0]),
    .S0(s0), .S1(s1), .P0(p0)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int ones;
      c = 7'(v);
      ones = 0;
      for (int b = 0; b < 7; b++) if (((v >> b) & 1) == 1) ones++;
      @(posedge clk);
      checks++;
      if ({p0, s1, s0} != 3'(ones)) begin
        failures++;
        $display("FAIL inputs=%07b got %0d expected %0d", c, {p0, s1, s0}, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
