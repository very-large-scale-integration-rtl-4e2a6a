// tb_multi_input_adder: random and corner-case operands for four sizes of the
// multi-operand adder: seven operands (column counters first), five and
// twelve (plain three-to-two layers), and two. Every sum is compared with a
// sum formed by the testbench in 64-bit arithmetic.
module tb_multi_input_adder;
  localparam int W = 13;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [6:0][W-1:0]  op7;   logic [W+2:0] s7;
  logic [4:0][W-1:0]  op5;   logic [W+2:0] s5;
  logic [11:0][W-1:0] op12;  logic [W+3:0] s12;
  logic [1:0][W-1:0]  op2;   logic [W:0]   s2;

  multi_input_adder #(.M(7),  .WI(W), .WO(W+3)) u7  (.op(op7),  .sum(s7));
  multi_input_adder #(.M(5),  .WI(W), .WO(W+3)) u5  (.op(op5),  .sum(s5));
  multi_input_adder #(.M(12), .WI(W), .WO(W+4)) u12 (.op(op12), .sum(s12));
  multi_input_adder #(.M(2),  .WI(W), .WO(W+1)) u2  (.op(op2),  .sum(s2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 2000; it++) begin
      longint e7, e5, e12, e2;
      e7 = 0; e5 = 0; e12 = 0; e2 = 0;
      for (int i = 0; i < 12; i++) begin
        logic [W-1:0] v;
        case (it % 4)
          0: v = W'($urandom);
          1: v = '1;                       // all ones: largest carries
          2: v = ($urandom % 2) ? '1 : '0;
          default: v = W'(1) << ($urandom % W);
        endcase
        op12[i] = v; e12 += longint'(v);
        if (i < 7) begin op7[i] = v; e7 += longint'(v); end
        if (i < 5) begin op5[i] = ~v; e5 += longint'(W'(~v)); end
        if (i < 2) begin op2[i] = v ^ W'(it); e2 += longint'(W'(v ^ W'(it))); end
      end
      @(posedge clk);
      check("M=7",  longint'(s7),  e7);
      check("M=5",  longint'(s5),  e5);
      check("M=12", longint'(s12), e12);
      check("M=2",  longint'(s2),  e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
