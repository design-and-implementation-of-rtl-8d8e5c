// fam_top_tb: end-to-end test of the fused add-multiply unit at its default
// size (N = 16, product 33 bits), Z = X * (A + B).
// Edge operands (largest and smallest signed and unsigned values, zero, A+B
// overflowing N bits) and 50,000 random operand sets are applied in both
// unsigned (tc = 0) and two's complement (tc = 1) mode; Z is compared with
// the product worked out in 64-bit integers. The test also counts how often
// each mechanism of the unit was exercised and fails if one never was:
// both operand modes, each radix-8 digit value -4..+4 (so every multiple
// 0, X, 2X, 3X, 4X and every negation), an A + B that needs more than N bits,
// and a product that needs all 2N+1 bits.
module fam_top_tb;
  import fam_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned D  = num_digits(N);
  localparam int unsigned PW = prod_width(N);

  int checks = 0, failures = 0;

  logic [N-1:0]  x, a, b;
  logic          tc;
  logic [PW-1:0] z;

  fam_top dut (.x(x), .a(a), .b(b), .tc(tc), .z(z));

  // mechanism counters
  int n_mode[2];
  int n_digit[9];   // index value+4
  int n_sum_wide;   // A + B outside the N-bit range of its mode
  int n_prod_wide;  // product needs bit 2N (unsigned) or is outside 2N-bit signed

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint val(logic [N-1:0] v, logic t);
    if (t && v[N-1]) return longint'(v) - (longint'(1) << N);
    return longint'(v);
  endfunction

  function automatic int digit_value(booth_digit_t d);
    int m;
    m = d.one ? 1 : d.two ? 2 : d.three ? 3 : d.four ? 4 : 0;
    return d.neg ? -m : m;
  endfunction

  task automatic apply(longint xv_raw, longint av_raw, longint bv_raw, logic t);
    longint xv, yv, zv;
    logic [PW-1:0] want;
    x = N'(xv_raw); a = N'(av_raw); b = N'(bv_raw); tc = t;
    #1;
    xv = val(x, t);
    yv = val(a, t) + val(b, t);
    zv = xv * yv;
    want = PW'(zv);
    checks++;
    if (z !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL tc=%b x=%0d a=%0d b=%0d: z=%h want %h", t, xv, val(a, t), val(b, t), z, want);
    end
    n_mode[t]++;
    for (int j = 0; j < int'(D); j++) n_digit[digit_value(dut.digits[j]) + 4]++;
    if (t ? (yv >= (longint'(1) << (N - 1)) || yv < -(longint'(1) << (N - 1)))
          : (yv >= (longint'(1) << N))) n_sum_wide++;
    if (t ? (zv >= (longint'(1) << (2 * N - 1)) || zv < -(longint'(1) << (2 * N - 1)))
          : (zv >= (longint'(1) << (2 * N)))) n_prod_wide++;
  endtask

  initial begin
    longint edges[8] = '{0, 1, 2, 3, 64'h7FFF, 64'h8000, 64'hFFFF, 64'hAAAA};
    for (int t = 0; t < 2; t++)
      foreach (edges[i]) foreach (edges[j]) foreach (edges[k])
        apply(edges[i], edges[j], edges[k], t[0]);
    for (int i = 0; i < 50000; i++)
      apply($urandom(), $urandom(), $urandom(), 1'($urandom()));

    $display("unsigned ops %0d, signed ops %0d", n_mode[0], n_mode[1]);
    for (int v = -4; v <= 4; v++) $display("digit %2d seen %0d times", v, n_digit[v + 4]);
    $display("A+B wider than N bits: %0d, product needing all 2N+1 bits: %0d", n_sum_wide, n_prod_wide);
    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0) begin failures++; $display("FAIL a mode never ran"); end
    for (int v = 0; v < 9; v++) begin
      checks++;
      if (n_digit[v] == 0) begin failures++; $display("FAIL digit %0d never occurred", v - 4); end
    end
    checks += 2;
    if (n_sum_wide == 0)  begin failures++; $display("FAIL A+B never exceeded N bits"); end
    if (n_prod_wide == 0) begin failures++; $display("FAIL no product needed 2N+1 bits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
