// booth_ppg_r8_tb: checks the radix-8 partial product generator at N = 16.
// Digits are driven directly (random values -4..+4, every value forced in
// turn, signed and unsigned X). Checks, modulo 2^PW:
//   row j + (neg[j] << 3j) = d[j] * X * 8^j     for every row
//   row D (correction) holds exactly the neg flags at bits 3j
//   sum of all rows = X * sum_j d[j] * 8^j
module booth_ppg_r8_tb;
  import fam_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned D  = num_digits(N);
  localparam int unsigned PW = prod_width(N);

  int checks = 0, failures = 0;

  logic [N-1:0]         x;
  logic                 tc;
  booth_digit_t [D-1:0] digits;
  logic [D:0][PW-1:0]   pp;

  booth_ppg_r8 dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic booth_digit_t make_digit(int v);
    booth_digit_t d;
    int m;
    d = '0;
    m = (v < 0) ? -v : v;
    d.neg   = (v < 0);
    d.one   = (m == 1);
    d.two   = (m == 2);
    d.three = (m == 3);
    d.four  = (m == 4);
    return d;
  endfunction

  task automatic apply(longint xv_raw, int dv[D], logic t);
    longint xv, total;
    logic [PW-1:0] acc, corr_ref, want;
    x = N'(xv_raw);
    tc = t;
    for (int j = 0; j < int'(D); j++) digits[j] = make_digit(dv[j]);
    #1;
    xv = (t && x[N-1]) ? longint'(x) - (longint'(1) << N) : longint'(x);
    acc = '0;
    corr_ref = '0;
    total = 0;
    for (int j = 0; j < int'(D); j++) begin
      longint term;
      term = longint'(dv[j]) * xv * (longint'(1) << (3 * j));
      want = PW'(term);
      checks++;
      if (PW'(pp[j] + (PW'(dv[j] < 0) << (3 * j))) != want) begin
        failures++;
        $display("FAIL row %0d: x=%0d d=%0d got %h want %h", j, xv, dv[j], pp[j], want);
      end
      corr_ref[3 * j] = (dv[j] < 0);
      total += term;
      acc += pp[j];
    end
    acc += pp[D];
    checks += 2;
    if (pp[D] != corr_ref) begin
      failures++;
      $display("FAIL correction row %h want %h", pp[D], corr_ref);
    end
    if (acc != PW'(total)) begin
      failures++;
      $display("FAIL row sum %h want %h", acc, PW'(total));
    end
  endtask

  initial begin
    int dv[D];
    for (int v = -4; v <= 4; v++) begin
      for (int j = 0; j < int'(D); j++) dv[j] = v;
      apply(16'hFFFF, dv, 1'b0);
      apply(16'hFFFF, dv, 1'b1);
      apply(16'h8000, dv, 1'b1);
      apply(16'h7FFF, dv, 1'b1);
      apply(16'h0001, dv, 1'b0);
    end
    for (int i = 0; i < 20000; i++) begin
      for (int j = 0; j < int'(D); j++) dv[j] = int'($urandom_range(8)) - 4;
      apply($urandom(), dv, 1'($urandom()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
