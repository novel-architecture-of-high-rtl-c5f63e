// tb_bec: exhaustive self-checking test of the 2-bit binary to excess-1
// converter. For every group sum b and carry bc, {ec, e} must equal
// {bc, b} + 1, the result a second adder with carry in 1 would give.
module tb_bec;
  int checks = 0, failures = 0;

  logic [1:0] b, e;
  logic       bc, ec;

  bec #(.W(2)) dut (.b, .bc, .e, .ec);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {bc, b} = i[2:0];
      #1;
      checks++;
      // bc and b all ones cannot come from a 2-bit add; the rule still holds
      // with the carry saturating at 1
      if ({ec, e} != ((i == 7) ? 3'b100 : i[2:0] + 3'd1)) begin
        failures++; $display("b=%b bc=%b -> e=%b ec=%b", b, bc, e, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
