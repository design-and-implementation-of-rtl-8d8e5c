// fam_pkg: types, sizes and the radix-8 Booth digit encoding shared by the
// fused add-multiply (FAM) unit.
//
// A radix-8 Booth digit takes one of the nine values -4..+4. It travels
// between the recoder and the partial product generator as a sign flag and a
// one-hot magnitude (one, two, three, four); all magnitude bits low means the
// digit is zero, and a zero digit never has its sign flag set.
//
// Sizes for an N-bit unit (N is the width of X, A and B):
//   * Y = A + B needs N+1 bits signed, or N+1 bits unsigned; N+2 bits in two's
//     complement hold it in both modes, so the recoder works on N+2 bits
//     extended to a multiple of three, giving ceil((N+2)/3) digits.
//   * The product X*(A+B) fits in 2N+1 bits: unsigned when the unit runs
//     unsigned, two's complement when it runs signed.
// The digit table follows the radix-8 Booth encoding table of the design;
// the sizes above are this implementation's own working.
package fam_pkg;

  typedef struct packed {
    logic neg;    // digit is negative
    logic one;    // |digit| = 1
    logic two;    // |digit| = 2
    logic three;  // |digit| = 3
    logic four;   // |digit| = 4
  } booth_digit_t;

  // Number of radix-8 digits for an N-bit unit.
  function automatic int unsigned num_digits(int unsigned n);
    return (n + 4) / 3;  // ceil((n + 2) / 3)
  endfunction

  // Width of the product Z = X * (A + B).
  function automatic int unsigned prod_width(int unsigned n);
    return 2 * n + 1;
  endfunction

  // Radix-8 Booth encoding of one overlapping group {y[i+2], y[i+1], y[i], y[i-1]}:
  // digit = -4*y[i+2] + 2*y[i+1] + y[i] + y[i-1].
  function automatic booth_digit_t booth_r8_encode(input logic [3:0] grp);
    booth_digit_t d;
    d = '0;
    case (grp)
      4'b0001, 4'b0010: d.one   = 1'b1;
      4'b0011, 4'b0100: d.two   = 1'b1;
      4'b0101, 4'b0110: d.three = 1'b1;
      4'b0111:          d.four  = 1'b1;
      4'b1000:          begin d.neg = 1'b1; d.four  = 1'b1; end
      4'b1001, 4'b1010: begin d.neg = 1'b1; d.three = 1'b1; end
      4'b1011, 4'b1100: begin d.neg = 1'b1; d.two   = 1'b1; end
      4'b1101, 4'b1110: begin d.neg = 1'b1; d.one   = 1'b1; end
      default:          d = '0;  // 0000 and 1111: digit 0
    endcase
    return d;
  endfunction

endpackage
