// cla: W-bit carry lookahead adder with carry in and carry out.
//
// The hybrid CSA tree uses these to resolve the low result bits two (radix-4)
// or three (radix-8) at a time, chained through ci/co, and the carry select
// final adder uses the 2-bit form for each of its groups. Every carry is a
// flat sum of products of the generate (g = a & b) and propagate (p = a ^ b)
// signals and the carry in, so no carry ripples through the block.
// Purely combinational.
// Only the block's role is given by the architecture; the flat lookahead
// form is this design's choice.
module cla #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  // c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[0]ci
  always_comb begin
    c[0] = ci;
    for (int i = 1; i <= W; i++) begin
      logic term;
      c[i] = 1'b0;
      for (int j = -1; j < i; j++) begin
        term = (j < 0) ? ci : g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end

  assign s  = p ^ c[W-1:0];
  assign co = c[W];

endmodule
