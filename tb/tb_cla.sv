// tb_cla: exhaustive self-checking test of the carry lookahead adder in the
// two widths the MAC uses, 2 bits and 3 bits. Every a, b and carry in is
// applied and {co, s} is compared with the integer sum a + b + ci.
module tb_cla;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2; logic ci2, co2;
  logic [2:0] a3, b3, s3; logic ci3, co3;

  cla #(.W(2)) dut2 (.a (a2), .b (b2), .ci (ci2), .s (s2), .co (co2));
  cla #(.W(3)) dut3 (.a (a3), .b (b3), .ci (ci3), .s (s3), .co (co3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci2, a2, b2} = i[4:0];
      #1;
      checks++;
      if ({co2, s2} != 3'(a2) + 3'(b2) + 3'(ci2)) begin
        failures++; $display("W=2 %0d+%0d+%0d -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int i = 0; i < 128; i++) begin
      {ci3, a3, b3} = i[6:0];
      #1;
      checks++;
      if ({co3, s3} != 4'(a3) + 4'(b3) + 4'(ci3)) begin
        failures++; $display("W=3 %0d+%0d+%0d -> %0d", a3, b3, ci3, {co3, s3});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
