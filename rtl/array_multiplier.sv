// array_multiplier: unsigned N x N cellular array multiplier (N = 4 by default).
//
// N*N identical mult_cell instances are arranged in N rows of N cells. Row j
// adds the partial product (a AND b_j) to the partial sum left by row j-1,
// shifted right by one bit:
//   R_0 = a*b_0,   R_j = (R_{j-1} >> 1) + a*b_j
// Inside a row the carry ripples from cell 0 to cell N-1, and the row's final
// carry becomes the top partial-sum bit fed to the next row, so no separate
// final adder is needed. The low bit of each row is a finished product bit;
// the last row supplies the upper N+1 product bits.
//
// Interface: a, b (N bits each) in, p = a*b (2N bits) out. Purely
// combinational; the worst path ripples through about 2N cells.
// The 4x4 size and the sixteen identical cells follow the original chip; the
// ripple-carry row topology is this design's own choice.
module array_multiplier #(
  parameter int unsigned N = tmul_pkg::MULT_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // s[j][i], c[j][i]: sum and carry out of the cell in row j, column i
  logic [N-1:0] s [N];
  logic [N-1:0] c [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      logic sin, cin;
      if (j == 0) begin : g_first_row
        assign sin = 1'b0;
      end else if (i < N - 1) begin : g_mid
        assign sin = s[j-1][i+1];
      end else begin : g_top
        assign sin = c[j-1][N-1];
      end
      if (i == 0) begin : g_c0
        assign cin = 1'b0;
      end else begin : g_cn
        assign cin = c[j][i-1];
      end
      mult_cell u_cell (
        .a        (a[i]),
        .b        (b[j]),
        .sum_in   (sin),
        .carry_in (cin),
        .sum_out  (s[j][i]),
        .carry_out(c[j][i])
      );
    end
  end

  always_comb begin
    for (int j = 0; j < N - 1; j++) p[j] = s[j][0];
    for (int i = 0; i < N; i++) p[N-1+i] = s[N-1][i];
    p[2*N-1] = c[N-1][N-1];
  end
endmodule
