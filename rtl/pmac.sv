// pmac: pipelined merged multiply-accumulate unit, P <- X * Y + P.
//
// Multiplication and accumulation share one carry save tree. The accumulated
// value is never resolved before it is fed back: its lower N bits come out of
// the tree already added (by small CLAs along the tree's edge), its upper N
// bits stay as a sum word and a carry word plus one carry bit from those
// CLAs. All of that goes straight back into the tree with the next pair of
// operands, so the wide final addition is off the accumulation loop.
//
//   stage 1: Booth recoding (radix 4 or 8) -> hybrid CSA tree, whose inputs
//            also take the registered previous value; results registered in
//            zlo_q / s_q / c_q / ci_q (the accumulator).
//   stage 2: carry select adder s_q + c_q + ci_q gives the upper N bits;
//            {upper, zlo_q} is registered as p.
//
// Interface: x (multiplier) and y (multiplicand) are N-bit two's complement.
// When en is high at a rising clk edge the pair is accepted: the accumulator
// becomes x*y + P, or x*y alone when clr is also high. With en low the
// accumulator holds. p is the 2N-bit two's complement accumulated value,
// modulo 2^(2N); it shows the effect of a pair accepted at edge k from
// edge k+1 on (two-cycle latency, one pair per clock). p_valid rises once
// the first pair has reached p. rst_n is an asynchronous active-low reset
// clearing the accumulator and p. acc_s, acc_c and acc_ci show the upper
// half of the accumulator as it is fed back (upper N bits of the value are
// acc_s + acc_c + acc_ci); they are valid one cycle before p.
//
// The merged tree, the fed-back sum and carry, the CLAs on the low bits and
// the BEC-based carry select final adder follow the architecture this unit
// implements; the enable/clear handshake, the reset and the placement of the
// two pipeline registers are this design's own choices.
module pmac
  import pmac_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned RADIX = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clr,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic           p_valid,
  // accumulator in carry save form (upper N bits), one cycle ahead of p
  output logic [N-1:0]   acc_s,
  output logic [N-1:0]   acc_c,
  output logic           acc_ci
);

  localparam int unsigned R = pp_rows(N, RADIX);
  localparam int unsigned W = pp_width(N, RADIX);

  // ---------------- stage 1: Booth + merged CSA tree ----------------
  logic [R-1:0][W-1:0] pp;
  logic [R-1:0]        neg;

  if (RADIX == 8) begin : g_r8
    booth_r8 #(.N(N)) u_booth (.x (x), .y (y), .pp (pp), .neg (neg));
  end else if (RADIX == 4) begin : g_r4
    booth_r4 #(.N(N)) u_booth (.x (x), .y (y), .pp (pp), .neg (neg));
  end else begin : g_bad
    $error("pmac: RADIX must be 4 or 8");
  end

  // accumulator registers
  logic [N-1:0] zlo_q, s_q, c_q;
  logic         ci_q, v1_q;

  // feedback: previous value, or zero to start a new sum
  logic [N-1:0] zlo_fb, s_fb, c_fb;
  logic         ci_fb;
  assign zlo_fb = clr ? '0 : zlo_q;
  assign s_fb   = clr ? '0 : s_q;
  assign c_fb   = clr ? '0 : c_q;
  assign ci_fb  = clr ? 1'b0 : ci_q;

  logic [N-1:0] zlo_d, s_d, c_d;
  logic         ci_d;

  csa_tree #(.N(N), .RADIX(RADIX)) u_tree (
    .pp     (pp),
    .neg    (neg),
    .zlo_fb (zlo_fb),
    .s_fb   (s_fb),
    .c_fb   (c_fb),
    .ci_fb  (ci_fb),
    .zlo    (zlo_d),
    .s      (s_d),
    .c      (c_d),
    .co     (ci_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zlo_q <= '0;
      s_q   <= '0;
      c_q   <= '0;
      ci_q  <= 1'b0;
      v1_q  <= 1'b0;
    end else if (en) begin
      zlo_q <= zlo_d;
      s_q   <= s_d;
      c_q   <= c_d;
      ci_q  <= ci_d;
      v1_q  <= 1'b1;
    end
  end

  assign acc_s  = s_q;
  assign acc_c  = c_q;
  assign acc_ci = ci_q;

  // ---------------- stage 2: carry select final adder ----------------
  logic [N-1:0] hi_d;

  csla #(.N(N), .G(2)) u_csla (
    .a    (s_q),
    .b    (c_q),
    .cin  (ci_q),
    .sum  (hi_d),
    .cout ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p       <= '0;
      p_valid <= 1'b0;
    end else begin
      p       <= {hi_d, zlo_q};
      p_valid <= v1_q;
    end
  end

endmodule
