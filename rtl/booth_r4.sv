// booth_r4: radix-4 modified Booth encoder and partial-product generator.
//
// The multiplier x is scanned in overlapping 3-bit groups
// (x[2i+1], x[2i], x[2i-1]), x[-1] = 0, giving N/2 digits
// d_i = -2 x[2i+1] + x[2i] + x[2i-1] in {-2..2}. Row i selects 0, y or 2y
// (N+1 bits, sign extended) and, for a negative digit, inverts it: the row is
// kept in one's complement and the missing +1 leaves as neg[i], which the CSA
// tree adds at the row's least significant position. A digit of zero from
// group 111 gives an all-zero row with neg = 0. x and y are two's complement.
// Purely combinational. N must be even.
// The digit rule and the one's-complement rows with a separate negate bit
// follow the architecture; the one-hot encoding signals are this design's.
module booth_r4
  import pmac_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]            x,
  input  logic [N-1:0]            y,
  output logic [N/2-1:0][N:0]     pp,
  output logic [N/2-1:0]          neg
);

  localparam int unsigned R = N / 2;

  logic [N:0] y1, y2;        // +y and +2y, N+1 bits
  logic [N:0] xe;            // {x, x[-1] = 0}
  booth_r4_t  dig [R];

  assign y1 = {y[N-1], y};
  assign y2 = {y, 1'b0};
  assign xe = {x, 1'b0};

  always_comb begin
    for (int i = 0; i < R; i++) begin
      logic [2:0]  grp;
      logic [N:0]  mag;
      grp        = xe[2*i +: 3];               // {x[2i+1], x[2i], x[2i-1]}
      dig[i].one = grp[1] ^ grp[0];
      dig[i].two = (grp == 3'b100) || (grp == 3'b011);
      dig[i].neg = grp[2] & ~(grp[1] & grp[0]);
      mag        = ({(N+1){dig[i].one}} & y1) | ({(N+1){dig[i].two}} & y2);
      pp[i]      = dig[i].neg ? ~mag : mag;
      neg[i]     = dig[i].neg;
    end
  end

endmodule
