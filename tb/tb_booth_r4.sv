// tb_booth_r4: exhaustive self-checking test of the radix-4 Booth stage at
// N = 8. For every x, y the four one's-complement rows, read as signed
// 9-bit numbers plus their negate bits and weighted by 4^i, must add up to
// x*y; each row must also lie in the range of the digit it encodes
// (|row value| <= 2|y|).
module tb_booth_r4;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0]          x, y;
  logic [N/2-1:0][N:0]   pp;
  logic [N/2-1:0]        neg;

  booth_r4 #(.N(N)) dut (.x, .y, .pp, .neg);

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
      for (int r = 0; r < N/2; r++) begin
        row = int'($signed(pp[r])) + int'(neg[r]);
        if (row > 2*ay || row < -2*ay) ok = 0;
        sum += row * (1 << (2*r));
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
