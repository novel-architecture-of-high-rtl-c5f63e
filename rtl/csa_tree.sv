// csa_tree: hybrid carry save adder tree of the merged MAC.
//
// Adds, in one combinational pass, the R Booth partial products, their negate
// bits and the previous accumulated value Z', and returns the new value with
// its lower N bits already resolved and its upper N bits still in carry save
// form:
//   zlo + 2^N * (s + c + co) = sum_i (pp_i + neg_i) * 2^(K*i)
//                               + zlo_fb + 2^N * (s_fb + c_fb + ci_fb)
// modulo 2^(2N), with K = 2 (radix-4) or 3 (radix-8).
//
// Structure (2N columns; each row is a full-adder row, a half adder where a
// column has only two inputs):
//   row 0      : partial product 0 with its sign-extension bits, the fed-back
//                word {c_fb, zlo_fb}, and one word holding the negate bits
//                of all rows (at column K*i) and ci_fb (at column N).
//   row 1..R-1 : adds partial product i, K*i columns up.
//   last row   : adds the fed-back upper sum word s_fb at columns N..2N-1.
// After row i, columns below K*(i+1) get no further input, so their sum and
// carry bits are taken out and added by a K-bit CLA (the last group spans up
// to column N-1: 2 bits for radix-4 and radix-8 alike at N = 8). The CLAs are
// chained through their carries; the last carry is co, at weight 2^N. So
// only the upper N columns reach the final adder.
//
// Sign extension: each one's-complement row is written as its low W-1 bits
// plus its inverted sign bit at column W-1; the constant
// -sum_i 2^(W-1+K*i) that this leaves is folded into the extension of row 0,
// which becomes (~s0 + constant) above column W-2.
// Purely combinational. Needs K*(R-1) < N.
//
// The row count, the early CLAs on the low bits and the sum/carry feedback
// follow the merged-MAC architecture; feeding the whole carry word into row 0
// and the sum word into the last row, the third input word of row 0 (negate
// bits and CLA carry) and folding all sign-extension constants into row 0 are
// this implementation's choices.
module csa_tree
  import pmac_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned RADIX = 4
) (
  input  logic [pp_rows(N, RADIX)-1:0][pp_width(N, RADIX)-1:0] pp,
  input  logic [pp_rows(N, RADIX)-1:0]                         neg,
  input  logic [N-1:0]                                         zlo_fb,
  input  logic [N-1:0]                                         s_fb,
  input  logic [N-1:0]                                         c_fb,
  input  logic                                                 ci_fb,
  output logic [N-1:0]                                         zlo,
  output logic [N-1:0]                                         s,
  output logic [N-1:0]                                         c,
  output logic                                                 co
);

  localparam int unsigned R  = pp_rows(N, RADIX);
  localparam int unsigned W  = pp_width(N, RADIX);
  localparam int unsigned K  = pp_shift(RADIX);
  localparam int unsigned A  = 2 * N;             // accumulator width
  localparam int unsigned XW = A + W + K * R;     // room for shifting before truncation

  // folded sign-extension constant, shifted down to column W-1
  function automatic logic [A-1:0] sign_const();
    logic [XW-1:0] k;
    k = '0;
    for (int i = 0; i < R; i++) k = k - (XW'(1) << (W - 1 + K * i));
    return A'(k >> (W - 1));
  endfunction
  localparam logic [A-1:0] KC = sign_const();

  // addend words of each row, 2N columns wide
  logic [R-1:0][A-1:0] arow;
  logic [A-1:0]        nv;

  always_comb begin
    logic [XW-1:0] t;
    // row 0: low bits of pp0, then (~s0 + constant) from column W-1 up
    t = XW'(pp[0][W-2:0]) | (XW'(KC + A'({~pp[0][W-1]})) << (W - 1));
    arow[0] = t[A-1:0];
    for (int i = 1; i < R; i++) begin
      t = XW'({~pp[i][W-1], pp[i][W-2:0]}) << (K * i);
      arow[i] = t[A-1:0];
    end
    nv = A'(ci_fb) << N;
    for (int i = 0; i < R; i++) nv[K*i] = neg[i];
  end

  // running sum / carry words after each row, resolved columns cleared
  logic [R-1:0][A-1:0] rs, rc;
  logic [R-1:0]        gco;   // carry out of each row's CLA

  for (genvar i = 0; i < R; i++) begin : g_row
    localparam int unsigned LO = K * i;
    localparam int unsigned HI = (i == R - 1) ? N - 1 : K * i + K - 1;
    localparam int unsigned GW = HI - LO + 1;

    logic [A-1:0] x0, x1, x2, fs, fc;
    if (i == 0) begin : g_in0
      assign x0 = arow[0];
      assign x1 = {c_fb, zlo_fb};
      assign x2 = nv;
    end else begin : g_in
      assign x0 = rs[i-1];
      assign x1 = rc[i-1];
      assign x2 = arow[i];
    end

    // row of full adders (carry word shifted to its weight)
    assign fs = x0 ^ x1 ^ x2;
    assign fc = ((x0 & x1) | (x0 & x2) | (x1 & x2)) << 1;

    // columns LO..HI are final: resolve them with the CLA chain
    logic cin_g;
    if (i == 0) begin : g_ci0
      assign cin_g = 1'b0;
    end else begin : g_ci
      assign cin_g = gco[i-1];
    end
    cla #(.W(GW)) u_cla (
      .a  (fs[HI:LO]),
      .b  (fc[HI:LO]),
      .ci (cin_g),
      .s  (zlo[HI:LO]),
      .co (gco[i])
    );

    assign rs[i] = {fs[A-1:HI+1], (HI + 1)'(0)};
    assign rc[i] = {fc[A-1:HI+1], (HI + 1)'(0)};
  end

  // accumulation row: fed-back upper sum word
  logic [A-1:0] ls, lc, sfw;
  assign sfw = {s_fb, N'(0)};
  assign ls  = rs[R-1] ^ rc[R-1] ^ sfw;
  assign lc  = ((rs[R-1] & rc[R-1]) | (rs[R-1] & sfw) | (rc[R-1] & sfw)) << 1;

  assign s  = ls[A-1:N];
  assign c  = lc[A-1:N];
  assign co = gco[R-1];

endmodule
