// compressor_4_2_tb: exhaustive check of one 4:2 compressor column.
// For all 32 input patterns it checks the column identity
// a1+a2+a3+a4+cin = sum + 2*(carry+cout), and that cout does not depend on
// cin (no ripple along a row).
module compressor_4_2_tb;
  logic a1, a2, a3, a4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_c0;
    for (int v = 0; v < 32; v++) begin
      {a4, a3, a2, a1, cin} = 5'(v);
      #1;
      checks++;
      if (int'(a1) + int'(a2) + int'(a3) + int'(a4) + int'(cin)
          != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
        failures++;
        $display("FAIL in=%05b sum=%b carry=%b cout=%b", v[4:0], sum, carry, cout);
      end
      if (cin == 1'b0) cout_c0 = cout;
      else begin
        checks++;
        if (cout != cout_c0) begin
          failures++;
          $display("FAIL cout depends on cin, in=%05b", v[4:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
