// compressor_5_2_row: a row of W compressor_5_2 cells, one per bit column.
//
// Reduces five W-bit rows to two: sum + carry = a1 + ... + a5 (mod 2^W).
// Column i takes cin1/cin2 from cout1/cout2 of column i-1 (column 0 takes 0).
// carry is returned already shifted into place. What leaves column W-1 is
// dropped: the row works modulo 2^W. Combinational.
module compressor_5_2_row #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a1,
  input  logic [W-1:0] a2,
  input  logic [W-1:0] a3,
  input  logic [W-1:0] a4,
  input  logic [W-1:0] a5,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;     // carry of each column, weight i+1
  logic [W:0]   link1;  // cout1 of column i-1 into cin1 of column i
  logic [W:0]   link2;  // cout2 of column i-1 into cin2 of column i

  assign link1[0] = 1'b0;
  assign link2[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_col
    compressor_5_2 u_c (
      .a1(a1[i]), .a2(a2[i]), .a3(a3[i]), .a4(a4[i]), .a5(a5[i]),
      .cin1(link1[i]), .cin2(link2[i]),
      .sum(sum[i]), .carry(cy[i]), .cout1(link1[i+1]), .cout2(link2[i+1])
    );
  end

  // cy[W-1], link1[W] and link2[W] carry weight 2^W and fall outside the result.
  assign carry = {cy[W-2:0], 1'b0};
endmodule
