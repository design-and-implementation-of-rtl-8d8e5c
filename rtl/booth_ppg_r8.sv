// booth_ppg_r8: radix-8 Booth partial product generator.
//
// For every Booth digit d[j] it selects 0, X, 2X, 3X or 4X, inverts it when
// the digit is negative and places it 3*j bits up, giving partial product row
// j. The "+1" that completes the two's complement negation of row j is not
// added here: it is set as bit 3*j of one extra correction row (row D), so
// every negation is finished for free in the compressor tree. Rows are
// sign-extended to the full product width PW = 2N+1 and all arithmetic is
// modulo 2^PW, which is exact because the product fits in PW bits.
// The hard multiple 3X = X + 2X is precomputed once with a Ladner-Fischer
// adder; X is sign-extended when tc = 1, zero-extended when tc = 0.
// The selection of +-X..+-4X follows the design's radix-8 Booth table;
// the correction row and the full sign extension are this implementation's
// choices. Interface: x (N bits), tc, digits[D-1:0]; pp[D:0] rows of PW bits.
// The low 3*j bits of row j and all but every third bit of the correction
// row are constant zero by construction; synthesis removes them.
// Purely combinational.
module booth_ppg_r8
  import fam_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned D  = num_digits(N),
  localparam int unsigned PW = prod_width(N)
) (
  input  logic [N-1:0]              x,
  input  logic                      tc,
  input  booth_digit_t [D-1:0]      digits,
  output logic [D:0][PW-1:0]        pp
);
  logic [PW-1:0] m1, m2, m3, m4;  // X, 2X, 3X, 4X

  assign m1 = {{(PW - N){tc & x[N-1]}}, x};
  assign m2 = m1 << 1;
  assign m4 = m1 << 2;

  logic m3_cout;  // weight 2^PW, unused
  ladner_fischer_adder #(.W(PW)) u_3x (
    .a(m1), .b(m2), .cin(1'b0), .sum(m3), .cout(m3_cout));

  logic [PW-1:0] corr;

  always_comb begin
    corr = '0;
    for (int j = 0; j < int'(D); j++) begin
      logic [PW-1:0] mag;
      mag = ({PW{digits[j].one}}   & m1)
          | ({PW{digits[j].two}}   & m2)
          | ({PW{digits[j].three}} & m3)
          | ({PW{digits[j].four}}  & m4);
      pp[j] = (digits[j].neg ? ~mag : mag) << (3 * j);
      corr[3 * j] = digits[j].neg;
    end
    pp[D] = corr;
  end
endmodule
