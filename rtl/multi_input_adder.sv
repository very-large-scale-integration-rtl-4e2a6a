// multi_input_adder: adds M unsigned operands of WI bits into one WO-bit sum.
// The operands are first reduced column-wise (the "vertical" view: every bit
// column is summed on its own) and then by layers of unlinked single-bit
// adders, each layer turning every three rows into two (sum row and carry row
// shifted one place left), arranged as a Wallace tree, until two rows remain;
// one carry-propagate adder then gives the sum. When M is seven, each bit
// column is first counted by a seven-input counter (counter7), which turns
// the seven rows into three at once. That use of counter7 and the final
// carry-propagate adder are this design's choices. Purely combinational.
// WO must be wide enough for the sum: WO >= WI + ceil(log2 M).
module multi_input_adder #(
  parameter int unsigned M  = 7,
  parameter int unsigned WI = 8,
  parameter int unsigned WO = WI + $clog2(M)
) (
  input  logic [M-1:0][WI-1:0] op,
  output logic [WO-1:0]        sum
);

  // Number of rows after one layer of three-to-two reduction.
  function automatic int unsigned next_rows(input int unsigned m);
    return (m / 3) * 2 + (m % 3);
  endfunction

  // Rows present before layer l, starting from m rows.
  function automatic int unsigned rows_at(input int unsigned m, input int unsigned l);
    int unsigned r = m;
    for (int unsigned i = 0; i < l; i++) r = next_rows(r);
    return r;
  endfunction

  // Layers needed to reach two rows or fewer.
  function automatic int unsigned layers(input int unsigned m);
    int unsigned r = m;
    int unsigned l = 0;
    while (r > 2) begin
      r = next_rows(r);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned M0 = (M == 7) ? 3 : M;   // rows entering the tree
  localparam int unsigned L  = layers(M0);

  // One array of rows per level of the tree: level 0 holds the rows
  // entering the tree, level l+1 the rows left after layer l.
  for (genvar l = 0; l <= L; l++) begin : g_lvl
    localparam int unsigned C  = rows_at(M0, l);
    logic [WO-1:0] r [M0];

    if (l == 0) begin : g_in
      if (M == 7) begin : g_cnt7
        logic [WI-1:0] s0, s1, p0;
        for (genvar b = 0; b < WI; b++) begin : g_col
          counter7 u_col (
            .C1(op[0][b]), .C2(op[1][b]), .C3(op[2][b]), .C4(op[3][b]),
            .C5(op[4][b]), .C6(op[5][b]), .C7(op[6][b]),
            .S0(s0[b]), .S1(s1[b]), .P0(p0[b])
          );
        end
        assign r[0] = WO'(s0);
        assign r[1] = WO'(s1) << 1;
        assign r[2] = WO'(p0) << 2;
      end else begin : g_direct
        for (genvar i = 0; i < M0; i++) begin : g_row
          assign r[i] = WO'(op[i]);
        end
      end
    end else begin : g_layer
      // Three-to-two layer applied to the rows of level l-1.
      localparam int unsigned CP = rows_at(M0, l - 1);
      localparam int unsigned T  = CP / 3;
      for (genvar t = 0; t < T; t++) begin : g_csa
        logic [WO-1:0] a, b, c;
        assign a = g_lvl[l-1].r[3*t];
        assign b = g_lvl[l-1].r[3*t+1];
        assign c = g_lvl[l-1].r[3*t+2];
        assign r[2*t]   = a ^ b ^ c;
        assign r[2*t+1] = ((a & b) | (a & c) | (b & c)) << 1;
      end
      for (genvar q = 0; q < CP % 3; q++) begin : g_pass
        assign r[2*T+q] = g_lvl[l-1].r[3*T+q];
      end
    end

    for (genvar z = C; z < M0; z++) begin : g_unused
      assign r[z] = '0;
    end
  end

  // Final carry-propagate adder.
  if (rows_at(M0, L) >= 2) begin : g_final2
    assign sum = g_lvl[L].r[0] + g_lvl[L].r[1];
  end else begin : g_final1
    assign sum = g_lvl[L].r[0];
  end

endmodule
