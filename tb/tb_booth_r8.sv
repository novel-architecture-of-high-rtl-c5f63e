// tb_booth_r8: exhaustive self-checking test of the radix-8 Booth stage at
// N = 8. For every x, y the three one's-complement rows, read as signed
// 10-bit numbers plus their negate bits and weighted by 8^i, must add up to
// x*y; each row must also lie in the range of the digit it encodes
// (|row value| <= 4|y|).
module tb_booth_r8;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0]          x, y;
  logic [(N+3)/3-1:0][N+1:0] pp;
  logic [(N+3)/3-1:0]       neg;

  booth_r8 #(.N(N)) dut (.x, .y, .pp, .neg);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int sum, row, ay;
      bit ok;
      {x, y} = i[15:0];
      #1;
      sum = 0; ok = 1;
      ay = $signed(y); if (ay < 0) ay = -ay;
      for (int r = 0; r < (N+3)/3; r++) begin
        row = int'($signed(pp[r])) + int'(neg[r]);
        if (row > 4*ay || row < -4*ay) ok = 0;
        sum += row * (1 << (3*r));
      end
      checks++;
      if (!ok || sum != int'($signed(x)) * int'($signed(y))) begin
        failures++;
        if (failures < 10) $display("x=%h y=%h sum=%0d", x, y, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
