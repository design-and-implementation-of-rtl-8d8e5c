// compressor_5_2_tb: exhaustive check of one 5:2 compressor column.
// For all 128 input patterns it checks the column identity
// a1+..+a5+cin1+cin2 = sum + 2*(carry+cout1+cout2), and that cout1/cout2 do
// not depend on cin1/cin2 (no ripple along a row).
module compressor_5_2_tb;
  logic a1, a2, a3, a4, a5, cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_5_2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] couts_ref;
    for (int v = 0; v < 128; v++) begin
      {a5, a4, a3, a2, a1, cin2, cin1} = 7'(v);
      #1;
      checks++;
      if (int'(a1) + int'(a2) + int'(a3) + int'(a4) + int'(a5) + int'(cin1) + int'(cin2)
          != int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2))) begin
        failures++;
        $display("FAIL in=%07b sum=%b carry=%b cout1=%b cout2=%b", v[6:0], sum, carry, cout1, cout2);
      end
      if (v[1:0] == 2'b00) couts_ref = {cout2, cout1};
      else begin
        checks++;
        if ({cout2, cout1} != couts_ref) begin
          failures++;
          $display("FAIL couts depend on carry-ins, in=%07b", v[6:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
