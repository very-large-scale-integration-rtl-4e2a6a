// tb_ssd_device_sizes: the whole device at sizes other than the defaults,
// so that the N-input adder is built from plain three-to-two layers instead
// of column counters, and the corner sizes are covered:
//   N = 5,  n = 12, k = 3  (h = 4)
//   N = 12, n = 8,  k = 2  (h = 4, deeper Wallace tree)
//   N = 3,  n = 10, k = 5  (h = 2)
//   N = 1,  n = 8,  k = 8  (one pair, one group: h = 1)
// Each instance streams sets through its own device and checks every result,
// its latency and the result rate (see ssd_stream_check).
module tb_ssd_device_sizes;
  logic clk = 0, rst_n = 0;
  int c0, c1, c2, c3, f0, f1, f2, f3;
  logic d0, d1, d2, d3;

  always #5 clk = ~clk;

  ssd_stream_check #(.N(5),  .NB(12), .K(3), .NSETS(600)) u0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  ssd_stream_check #(.N(12), .NB(8),  .K(2), .NSETS(600)) u1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  ssd_stream_check #(.N(3),  .NB(10), .K(5), .NSETS(600)) u2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));
  ssd_stream_check #(.N(1),  .NB(8),  .K(8), .NSETS(600)) u3 (.clk, .rst_n, .checks(c3), .failures(f3), .done(d3));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end
endmodule
