// smb_recoder_r8_tb: checks the radix-8 sum recoder at N = 16 and N = 17.
// For each input it forms Y = A + B in a wide integer (signed or unsigned
// by tc) and checks that every digit equals -4*y[3j+2] + 2*y[3j+1] + y[3j] +
// y[3j-1] of Y, that its magnitude field is one-hot or empty, that a zero
// digit is not flagged negative, and that sum_j d[j]*8^j equals Y.
module smb_recoder_r8_tb;
  import fam_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16;
  logic [16:0] a17, b17;
  logic        tc;
  booth_digit_t [num_digits(16)-1:0] d16;
  booth_digit_t [num_digits(17)-1:0] d17;

  smb_recoder_r8                dut16 (.a(a16), .b(b16), .tc(tc), .digits(d16));
  smb_recoder_r8 #(.N(17))      dut17 (.a(a17), .b(b17), .tc(tc), .digits(d17));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint digit_value(booth_digit_t d);
    longint m;
    m = d.one ? 1 : d.two ? 2 : d.three ? 3 : d.four ? 4 : 0;
    return d.neg ? -m : m;
  endfunction

  function automatic longint ext(longint v, int n, logic s);
    if (s && v[n-1]) return v - (longint'(1) << n);
    return v;
  endfunction

  task automatic check_digits(int n, int nd, longint y, booth_digit_t dg[]);
    longint acc = 0;
    longint w   = 1;
    for (int j = 0; j < nd; j++) begin
      longint ref_d;
      logic [3:0] grp;
      grp = {y[3*j+2], y[3*j+1], y[3*j], (j == 0) ? 1'b0 : y[3*j-1]};
      ref_d = -4 * longint'(grp[3]) + 2 * longint'(grp[2]) + longint'(grp[1]) + longint'(grp[0]);
      checks++;
      if (digit_value(dg[j]) != ref_d
          || !$onehot0({dg[j].one, dg[j].two, dg[j].three, dg[j].four})
          || (dg[j].neg && ref_d == 0)) begin
        failures++;
        $display("FAIL N=%0d Y=%0d digit %0d: got %05b want %0d", n, y, j, dg[j], ref_d);
      end
      acc += digit_value(dg[j]) * w;
      w *= 8;
    end
    checks++;
    if (acc != y) begin
      failures++;
      $display("FAIL N=%0d digits sum to %0d, Y=%0d", n, acc, y);
    end
  endtask

  task automatic apply(longint av, longint bv, logic t);
    booth_digit_t dg[];
    longint y;
    a16 = 16'(av); b16 = 16'(bv); a17 = 17'(av); b17 = 17'(bv); tc = t;
    #1;
    y = ext(longint'(a16), 16, t) + ext(longint'(b16), 16, t);
    dg = new[num_digits(16)];
    foreach (dg[j]) dg[j] = d16[j];
    check_digits(16, num_digits(16), y, dg);
    y = ext(longint'(a17), 17, t) + ext(longint'(b17), 17, t);
    dg = new[num_digits(17)];
    foreach (dg[j]) dg[j] = d17[j];
    check_digits(17, num_digits(17), y, dg);
  endtask

  initial begin
    for (int t = 0; t < 2; t++) begin
      apply(0, 0, t[0]);
      apply(-1, -1, t[0]);
      apply(-1, 1, t[0]);
      apply(32'h7FFF, 32'h7FFF, t[0]);
      apply(32'h8000, 32'h8000, t[0]);
      apply(32'h10000, 32'h10000, t[0]);
      apply(32'hFFFF, 32'h1FFFF, t[0]);
    end
    for (int i = 0; i < 20000; i++) apply($urandom(), $urandom(), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
