// csla: N-bit carry select adder with binary to excess-1 converters.
//
// The final adder of the MAC. The operands are split into G-bit groups. The
// lowest group is a G-bit CLA that takes the real carry in. Each higher group
// has one G-bit CLA with carry in 0 and a BEC that turns its result into the
// carry-in-1 result; a multiplexer picks one of the two with the carry out
// of the group below, so the only serial path is one multiplexer per group.
// With the defaults (N = 8, G = 2) this is four groups: [1:0] CLA, and
// [3:2], [5:4], [7:6] CLA + 2-bit BEC + MUX, as in the structure this MAC
// follows. N must be a multiple of G. Purely combinational.
// Using the carry out of the low-bit CLA chain as cin is this design's
// reading of the adder's carry input.
module csla #(
  parameter int unsigned N = 8,
  parameter int unsigned G = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = N / G;

  logic [NG:0] gc;  // carry into each group
  assign gc[0] = cin;

  // lowest group: plain CLA with the real carry in
  cla #(.W(G)) u_cla0 (
    .a (a[G-1:0]), .b (b[G-1:0]), .ci (gc[0]),
    .s (sum[G-1:0]), .co (gc[1])
  );

  for (genvar k = 1; k < NG; k++) begin : g_grp
    logic [G-1:0] s0, s1;
    logic         c0, c1;
    cla #(.W(G)) u_cla (
      .a (a[k*G +: G]), .b (b[k*G +: G]), .ci (1'b0),
      .s (s0), .co (c0)
    );
    bec #(.W(G)) u_bec (.b (s0), .bc (c0), .e (s1), .ec (c1));
    // multiplexer driven by the carry out of the group below
    assign sum[k*G +: G] = gc[k] ? s1 : s0;
    assign gc[k+1]       = gc[k] ? c1 : c0;
  end

  assign cout = gc[NG];

endmodule
