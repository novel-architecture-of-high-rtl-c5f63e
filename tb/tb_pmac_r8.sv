// tb_pmac_r8: end-to-end self-checking test of the MAC in its radix-8
// configuration (N = 8, three partial-product rows, 3-bit low-bit CLAs).
//
// A reference model keeps the accumulated value as a plain 2N-bit integer,
// updated with x*y (or replaced by it on clr) whenever en is high, and
// delayed one more cycle to match the two-cycle latency of p. The test
// runs: the worked example 0x19 * 0xDD = 0xFC95 (-875), all 2^16 operand
// pairs as fresh products, then long random sequences mixing accumulation,
// clears and idle cycles. p and p_valid are compared every cycle, and the
// carry save words acc_s + acc_c + acc_ci with the model's upper half. It also
// counts how often each mechanism occurred (clear, accumulate, hold, carry
// from the low CLAs into the final adder, a carry select group taking its
// BEC result, wrap-around of the 2N-bit sum) and fails any that never did.
module tb_pmac_r8;
  localparam int N = 8;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           en, clr;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic           p_valid;
  logic [N-1:0]   acc_s, acc_c;
  logic           acc_ci;

  int checks = 0, failures = 0;
  int n_clr = 0, n_acc = 0, n_hold = 0, n_ci = 0, n_bec = 0, n_wrap = 0;

  pmac #(.N(N), .RADIX(8)) dut (.clk, .rst_n, .en, .clr, .x, .y, .p, .p_valid, .acc_s, .acc_c, .acc_ci);

  always #5 clk = ~clk;

  // reference model
  logic [2*N-1:0] acc_m, p_m;
  logic           v1_m, pv_m;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_m <= '0; p_m <= '0; v1_m <= 1'b0; pv_m <= 1'b0;
    end else begin
      if (en) begin
        logic signed [2*N-1:0] prod;
        logic signed [2*N+1:0] wide;
        prod = (2*N)'($signed(x) * $signed(y));
        wide = (clr ? 0 : $signed({{2{acc_m[2*N-1]}}, acc_m})) + $signed({{2{prod[2*N-1]}}, prod});
        if (wide != $signed({{2{wide[2*N-1]}}, wide[2*N-1:0]})) n_wrap++;
        acc_m <= wide[2*N-1:0];
        v1_m  <= 1'b1;
        if (clr) n_clr++; else n_acc++;
      end else n_hold++;
      p_m  <= acc_m;
      pv_m <= v1_m;
    end
  end

  // mechanism counters on the final adder
  // (a carry into group 1..3 of the carry select adder selects its BEC result)
  always @(posedge clk) if (rst_n) begin
    logic [N:0] t2, t4, t6;
    t2 = (N+1)'(acc_s[1:0]) + (N+1)'(acc_c[1:0]) + (N+1)'(acc_ci);
    t4 = (N+1)'(acc_s[3:0]) + (N+1)'(acc_c[3:0]) + (N+1)'(acc_ci);
    t6 = (N+1)'(acc_s[5:0]) + (N+1)'(acc_c[5:0]) + (N+1)'(acc_ci);
    if (acc_ci) n_ci++;
    if (t2[2] || t4[4] || t6[6]) n_bec++;
  end

  // the carry save words must add up to the upper half of the accumulator,
  // which reaches p one cycle later
  always @(negedge clk) if (rst_n && pv_m) begin
    checks++;
    if (N'(acc_s + acc_c + N'(acc_ci)) !== acc_m[2*N-1:N]) begin
      failures++;
      if (failures < 10) $display("carry save words %h + %h + %b != %h", acc_s, acc_c, acc_ci, acc_m[2*N-1:N]);
    end
  end

  // compare every cycle, half a cycle after the edge
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (p !== p_m || p_valid !== pv_m) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH t=%0t p=%h exp=%h valid=%b exp=%b", $time, p, p_m, p_valid, pv_m);
    end
  end

  task automatic drive(input logic e, input logic c, input logic [N-1:0] xv, input logic [N-1:0] yv);
    @(negedge clk);
    en = e; clr = c; x = xv; y = yv;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // worked example: fresh product, visible on p two edges later
    drive(1'b1, 1'b1, 8'h19, 8'hDD);
    drive(1'b0, 1'b0, 8'h00, 8'h00);
    @(negedge clk);
    checks++;
    if (p !== 16'hFC95) begin
      failures++;
      $display("example: p=%h expected FC95", p);
    end

    // every operand pair as a fresh product, one per clock
    for (int i = 0; i < 65536; i++) drive(1'b1, 1'b1, i[15:8], i[7:0]);

    // random accumulate / clear / hold sequences
    for (int i = 0; i < 100000; i++) begin
      logic [31:0] r;
      r = $urandom;
      drive(r[3:0] != 0, r[8:4] == 0, r[23:16], r[31:24]);
    end
    // long accumulation of extreme values to wrap the sum
    for (int i = 0; i < 200; i++) drive(1'b1, i == 0, 8'h80, 8'h80);
    drive(1'b0, 1'b0, 8'h00, 8'h00);
    repeat (3) @(negedge clk);

    if (n_clr == 0)  begin failures++; $display("no clear seen"); end
    if (n_acc == 0)  begin failures++; $display("no accumulation seen"); end
    if (n_hold == 0) begin failures++; $display("no hold seen"); end
    if (n_ci == 0)   begin failures++; $display("no CLA carry into final adder"); end
    if (n_bec == 0)  begin failures++; $display("no BEC selection"); end
    if (n_wrap == 0) begin failures++; $display("no wrap-around"); end
    $display("mechanisms: clear=%0d accumulate=%0d hold=%0d cla_carry=%0d bec_select=%0d wrap=%0d",
             n_clr, n_acc, n_hold, n_ci, n_bec, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
