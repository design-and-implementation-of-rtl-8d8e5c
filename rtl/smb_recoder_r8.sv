// smb_recoder_r8: radix-8 sum-to-modified-Booth (S-MB) recoder.
//
// Turns the two addends A and B straight into the radix-8 Booth digits of
// their sum Y = A + B, so no separate adder sits in front of the multiplier.
// Adder and encoder form one structure: a chain of full adders produces the
// bits of Y (A and B sign-extended when tc = 1, zero-extended when tc = 0, to
// 3*D bits), and every overlapping 4-bit group {y[3j+2], y[3j+1], y[3j],
// y[3j-1]} (y[-1] = 0) is encoded with the radix-8 Booth table into one digit
// d[j] in {-4..+4}, so that Y = sum_j d[j] * 8^j.
// The design says the recoder is built from half adders, full adders and
// modified adders, and handles signed and unsigned operands of odd and even
// width; the bit-level S-MB schemes are not spelled out, so this simple
// full-adder chain plus table encoder is this implementation's own choice.
// Interface: a, b (N bits), tc (1 = two's complement); digits[D-1:0], one
// booth_digit_t per digit, D = ceil((N+2)/3). Purely combinational.
module smb_recoder_r8
  import fam_pkg::*;
#(
  parameter int unsigned N = 16,
  localparam int unsigned D = num_digits(N)
) (
  input  logic [N-1:0]              a,
  input  logic [N-1:0]              b,
  input  logic                      tc,
  output booth_digit_t [D-1:0]      digits
);
  localparam int unsigned YW = 3 * D;  // >= N+2: Y in two's complement

  logic [YW-1:0] ae, be;  // extended addends
  logic [YW-1:0] y;       // Y = A + B
  logic [YW:0]   c;       // carry chain

  assign ae = {{(YW - N){tc & a[N-1]}}, a};
  assign be = {{(YW - N){tc & b[N-1]}}, b};
  assign c[0] = 1'b0;

  for (genvar i = 0; i < YW; i++) begin : g_add
    full_adder u_fa (.a(ae[i]), .b(be[i]), .ci(c[i]), .s(y[i]), .co(c[i+1]));
  end
  // c[YW] has weight 2^YW: Y fits in YW bits, so it is not needed.

  logic [YW:0] yz;  // y with the implicit y[-1] = 0 appended
  assign yz = {y, 1'b0};

  for (genvar j = 0; j < D; j++) begin : g_enc
    assign digits[j] = booth_r8_encode(yz[3*j +: 4]);
  end
endmodule
