// fam_top: fused add-multiply unit, Z = X * (A + B).
//
// Instead of adding A and B and then multiplying, the sum is recoded directly
// into radix-8 modified Booth digits and fed to a Booth multiplier:
//   smb_recoder_r8      A, B  -> D = ceil((N+2)/3) Booth digits of A + B
//   booth_ppg_r8        X, digits -> D partial products + 1 correction row
//   pp_compressor_tree  D+1 rows -> sum and carry rows (5:2 and 4:2 compressors)
//   ladner_fischer_adder sum + carry -> Z
// The chain of blocks follows the design; widths, the correction row and the
// compressor schedule are this implementation's choices (see each module).
//
// Interface: x, a, b are N bits; tc = 1 treats all three as two's complement,
// tc = 0 as unsigned. z is 2N+1 bits: the exact product, unsigned or two's
// complement according to tc. The unit is purely combinational (no clock, no
// registers): z is valid one combinational delay after the inputs change.
// Default N = 16; odd widths (e.g. 17) are supported as well.
module fam_top
  import fam_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned D  = num_digits(N),
  localparam int unsigned PW = prod_width(N)
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          tc,
  output logic [PW-1:0] z
);
  booth_digit_t [D-1:0] digits;
  logic [D:0][PW-1:0]   pp;
  logic [PW-1:0]        s_row, c_row;
  logic                 z_cout;  // weight 2^PW, outside the product

  smb_recoder_r8 #(.N(N)) u_recoder (
    .a(a), .b(b), .tc(tc), .digits(digits));

  booth_ppg_r8 #(.N(N)) u_ppg (
    .x(x), .tc(tc), .digits(digits), .pp(pp));

  pp_compressor_tree #(.W(PW), .ROWS(D + 1)) u_tree (
    .rows(pp), .sum(s_row), .carry(c_row));

  ladner_fischer_adder #(.W(PW)) u_lfa (
    .a(s_row), .b(c_row), .cin(1'b0), .sum(z), .cout(z_cout));
endmodule
