// compressor_4_2_row: a row of W compressor_4_2 cells, one per bit column.
//
// Reduces four W-bit rows to two: sum + carry = a1 + a2 + a3 + a4 (mod 2^W).
// Column i takes its cin from the cout of column i-1 (column 0 takes 0).
// carry is returned already shifted into place (bit i of carry holds the
// carry of column i-1), so the two outputs can be added directly. What
// leaves column W-1 is dropped: the row works modulo 2^W. Combinational.
module compressor_4_2_row #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  input  logic [W-1:0] a3,
  input  logic [W-1:0] a4,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;    // carry of each column, weight i+1
  logic [W:0]   link;  // cout of column i-1 into column i

  assign link[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_4_2 u_c (
      .a1(a1[i]), .a2(a2[i]), .a3(a3[i]), .a4(a4[i]),
      .cin(link[i]),
      .sum(sum[i]), .carry(cy[i]), .cout(link[i+1])
    );
  end

  // cy[W-1] and link[W] carry weight 2^W and fall outside the result.
  assign carry = {cy[W-2:0], 1'b0};
endmodule
