// tb_csla: exhaustive self-checking test of the 8-bit carry select final
// adder (four 2-bit groups, BEC for carry in 1). All 2^17 combinations of
// a, b and cin are applied; {cout, sum} must equal a + b + cin.
module tb_csla;
  int checks = 0, failures = 0;

  logic [7:0] a, b, sum;
  logic       cin, cout;

  csla #(.N(8), .G(2)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, a, b} = i[16:0];
      #1;
      checks++;
      if ({cout, sum} != 9'(a) + 9'(b) + 9'(cin)) begin
        failures++;
        if (failures < 10) $display("%h+%h+%b -> %b %h", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
