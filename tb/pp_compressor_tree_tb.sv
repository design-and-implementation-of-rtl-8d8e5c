// pp_compressor_tree_tb: checks sum + carry = sum of all rows (mod 2^W) for
// every compressor schedule: 3 rows (one 4:2 level), 7 rows at W = 33 (the
// 16-bit unit: 5:2 then 4:2), 8 rows at W = 35 (the 17-bit unit: 5:2 then
// 5:2) and 10 rows (two 5:2 side by side, then 4:2). Rows are random, all
// ones, or all zeros.
module pp_compressor_tree_tb;
  int checks = 0, failures = 0;

  logic [2:0][32:0] r3;   logic [32:0] s3, c3;
  logic [6:0][32:0] r7;   logic [32:0] s7, c7;
  logic [7:0][34:0] r8;   logic [34:0] s8, c8;
  logic [9:0][34:0] r10;  logic [34:0] s10, c10;

  pp_compressor_tree #(.W(33), .ROWS(3))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  pp_compressor_tree                      dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  pp_compressor_tree #(.W(35), .ROWS(8))  dut8  (.rows(r8),  .sum(s8),  .carry(c8));
  pp_compressor_tree #(.W(35), .ROWS(10)) dut10 (.rows(r10), .sum(s10), .carry(c10));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [34:0] rnd35(int mode);
    if (mode == 1) return '1;
    if (mode == 2) return '0;
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [32:0] e33a, e33b;
      logic [34:0] e35a, e35b;
      int mode;
      mode = (i < 2) ? i + 1 : 0;
      e33a = '0; e33b = '0; e35a = '0; e35b = '0;
      for (int k = 0; k < 3; k++)  begin r3[k]  = 33'(rnd35(mode)); e33a += r3[k]; end
      for (int k = 0; k < 7; k++)  begin r7[k]  = 33'(rnd35(mode)); e33b += r7[k]; end
      for (int k = 0; k < 8; k++)  begin r8[k]  = rnd35(mode);      e35a += r8[k]; end
      for (int k = 0; k < 10; k++) begin r10[k] = rnd35(mode);      e35b += r10[k]; end
      #1;
      checks += 4;
      if (33'(s3 + c3) != e33a)   begin failures++; $display("FAIL ROWS=3");  end
      if (33'(s7 + c7) != e33b)   begin failures++; $display("FAIL ROWS=7");  end
      if (35'(s8 + c8) != e35a)   begin failures++; $display("FAIL ROWS=8");  end
      if (35'(s10 + c10) != e35b) begin failures++; $display("FAIL ROWS=10"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
