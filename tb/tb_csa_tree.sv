// tb_csa_tree: self-checking test of the hybrid CSA tree in both of its
// configurations (radix-4: four rows and 2-bit CLAs; radix-8: three rows and
// 3/3/2-bit CLAs), N = 8.
//
// Partial products come from the Booth stages; the fed-back words Z', S', C'
// and carry are random. The tree must return the low N bits of
// x*y + Z' exactly on zlo, and zlo + 2^N (s + c + co) must equal
// x*y + zlo_fb + 2^N (s_fb + c_fb + ci_fb) modulo 2^(2N). Corner cases with
// all-ones feedback and the extreme operands are applied first.
module tb_csa_tree;
  localparam int N = 8;
  int checks = 0, failures = 0;

  logic [N-1:0] x, y, zlo_fb, s_fb, c_fb;
  logic         ci_fb;

  logic [N/2-1:0][N:0]         pp4;
  logic [N/2-1:0]              neg4;
  logic [(N+3)/3-1:0][N+1:0]   pp8;
  logic [(N+3)/3-1:0]          neg8;
  logic [N-1:0] zlo4, s4, c4, zlo8, s8, c8;
  logic         co4, co8;

  booth_r4 #(.N(N)) u_b4 (.x, .y, .pp (pp4), .neg (neg4));
  booth_r8 #(.N(N)) u_b8 (.x, .y, .pp (pp8), .neg (neg8));

  csa_tree #(.N(N), .RADIX(4)) dut4 (
    .pp (pp4), .neg (neg4), .zlo_fb, .s_fb, .c_fb, .ci_fb,
    .zlo (zlo4), .s (s4), .c (c4), .co (co4));
  csa_tree #(.N(N), .RADIX(8)) dut8 (
    .pp (pp8), .neg (neg8), .zlo_fb, .s_fb, .c_fb, .ci_fb,
    .zlo (zlo8), .s (s8), .c (c8), .co (co8));

  task automatic check();
    logic [2*N-1:0] exp, got4, got8, prod;
    #1;
    prod = (2*N)'($signed(x) * $signed(y));
    exp  = prod + {8'h00, zlo_fb} + ({8'h00, s_fb} << N) + ({8'h00, c_fb} << N) + ({15'h0, ci_fb} << N);
    got4 = {8'h00, zlo4} + ({8'h00, s4} << N) + ({8'h00, c4} << N) + ({15'h0, co4} << N);
    got8 = {8'h00, zlo8} + ({8'h00, s8} << N) + ({8'h00, c8} << N) + ({15'h0, co8} << N);
    checks += 2;
    if (got4 !== exp || zlo4 !== exp[N-1:0]) begin
      failures++;
      if (failures < 10) $display("r4 x=%h y=%h fb=%h/%h/%h/%b got %h exp %h", x, y, zlo_fb, s_fb, c_fb, ci_fb, got4, exp);
    end
    if (got8 !== exp || zlo8 !== exp[N-1:0]) begin
      failures++;
      if (failures < 10) $display("r8 x=%h y=%h fb=%h/%h/%h/%b got %h exp %h", x, y, zlo_fb, s_fb, c_fb, ci_fb, got8, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int f = 0; f < 2; f++) begin
          logic [N-1:0] v [4] = '{8'h00, 8'h7F, 8'h80, 8'hFF};
          x = v[i]; y = v[j];
          {zlo_fb, s_fb, c_fb, ci_fb} = f ? '1 : '0;
          check();
        end
    for (int i = 0; i < 200000; i++) begin
      {x, y} = 16'($urandom);
      {zlo_fb, s_fb, c_fb} = 24'($urandom);
      ci_fb = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
