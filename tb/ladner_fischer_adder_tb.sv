// ladner_fischer_adder_tb: checks {cout, sum} = a + b + cin for three widths
// at once: 8 bits exhaustively (all a, b, cin), and 33 bits (the product
// width of the 16-bit unit) and 17 bits (odd, non power of two) with edge
// values and random operands.
module ladner_fischer_adder_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [32:0] a33, b33, s33;
  logic        ci33, co33;
  logic [16:0] a17, b17, s17;
  logic        ci17, co17;

  ladner_fischer_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ladner_fischer_adder           dut33 (.a(a33), .b(b33), .cin(ci33), .sum(s33), .cout(co33));
  ladner_fischer_adder #(.W(17)) dut17 (.a(a17), .b(b17), .cin(ci17), .sum(s17), .cout(co17));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_wide(input logic [32:0] a, input logic [32:0] b, input logic ci);
    logic [33:0] exp33;
    logic [17:0] exp17;
    a33 = a; b33 = b; ci33 = ci;
    a17 = a[16:0]; b17 = b[16:0]; ci17 = ci;
    #1;
    exp33 = 34'(a) + 34'(b) + 34'(ci);
    exp17 = 18'(a[16:0]) + 18'(b[16:0]) + 18'(ci);
    checks += 2;
    if ({co33, s33} != exp33) begin
      failures++;
      $display("FAIL W=33 %h + %h + %b = %h, got %h", a, b, ci, exp33, {co33, s33});
    end
    if ({co17, s17} != exp17) begin
      failures++;
      $display("FAIL W=17 %h + %h + %b = %h, got %h", a[16:0], b[16:0], ci, exp17, {co17, s17});
    end
  endtask

  initial begin
    a33 = '0; b33 = '0; ci33 = 0; a17 = '0; b17 = '0; ci17 = 0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(a); b8 = 8'(b); ci8 = c[0];
          #1;
          checks++;
          if ({co8, s8} != 9'(a + b + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d, got %0d", a, b, c, {co8, s8});
          end
        end
    check_wide('1, '0, 1'b1);          // full carry propagation
    check_wide('1, '1, 1'b1);
    check_wide('1, 33'd1, 1'b0);
    check_wide(33'h0AAAAAAAA, 33'h155555555, 1'b1);
    for (int i = 0; i < 20000; i++)
      check_wide({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
