// pp_compressor_tree: partial product reduction with 5:2 and 4:2 compressors.
//
// Reduces ROWS rows of W bits to one sum row and one carry row whose sum
// equals the sum of all rows modulo 2^W; a final carry-propagate adder
// completes the product. The design reduces its partial products with 4:2
// and 5:2 compressors; which rows go to which compressor is this
// implementation's own schedule, chosen so that at most two compressor levels
// are used for up to ten rows (missing rows are tied to zero):
//   ROWS <= 4 : one 4:2 level
//   ROWS 5..7 : 5:2 on rows 0-4, then 4:2 on its two outputs and rows 5-6
//               (the 16-bit unit has 7 rows: 6 partial products and the row
//               of two's complement correction bits)
//   ROWS = 8  : 5:2 on rows 0-4, then 5:2 on its two outputs and rows 5-7
//               (the 17-bit unit)
//   ROWS 9..10: two 5:2 on rows 0-4 and 5-9 side by side, then one 4:2
// Purely combinational; outputs follow the inputs after the compressor delay.
module pp_compressor_tree #(
  parameter int unsigned W    = 33,
  parameter int unsigned ROWS = 7
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);
  if (ROWS < 2 || ROWS > 10) begin : g_bad
    $error("pp_compressor_tree: ROWS must be 2..10");
  end

  // Rows padded with zeros up to the ten the largest schedule reads.
  logic [9:0][W-1:0] r;
  always_comb begin
    r = '0;
    for (int k = 0; k < int'(ROWS); k++) r[k] = rows[k];
  end

  if (ROWS <= 4) begin : g_l1
    compressor_4_2_row #(.W(W)) u_c42 (
      .a1(r[0]), .a2(r[1]), .a3(r[2]), .a4(r[3]), .sum(sum), .carry(carry));
  end else if (ROWS <= 7) begin : g_l2_52_42
    logic [W-1:0] s1, c1;
    compressor_5_2_row #(.W(W)) u_c52 (
      .a1(r[0]), .a2(r[1]), .a3(r[2]), .a4(r[3]), .a5(r[4]), .sum(s1), .carry(c1));
    compressor_4_2_row #(.W(W)) u_c42 (
      .a1(s1), .a2(c1), .a3(r[5]), .a4(r[6]), .sum(sum), .carry(carry));
  end else if (ROWS == 8) begin : g_l2_52_52
    logic [W-1:0] s1, c1;
    compressor_5_2_row #(.W(W)) u_c52a (
      .a1(r[0]), .a2(r[1]), .a3(r[2]), .a4(r[3]), .a5(r[4]), .sum(s1), .carry(c1));
    compressor_5_2_row #(.W(W)) u_c52b (
      .a1(s1), .a2(c1), .a3(r[5]), .a4(r[6]), .a5(r[7]), .sum(sum), .carry(carry));
  end else begin : g_l2_2x52_42
    logic [W-1:0] s1, c1, s2, c2;
    compressor_5_2_row #(.W(W)) u_c52a (
      .a1(r[0]), .a2(r[1]), .a3(r[2]), .a4(r[3]), .a5(r[4]), .sum(s1), .carry(c1));
    compressor_5_2_row #(.W(W)) u_c52b (
      .a1(r[5]), .a2(r[6]), .a3(r[7]), .a4(r[8]), .a5(r[9]), .sum(s2), .carry(c2));
    compressor_4_2_row #(.W(W)) u_c42 (
      .a1(s1), .a2(c1), .a3(s2), .a4(c2), .sum(sum), .carry(carry));
  end
endmodule
