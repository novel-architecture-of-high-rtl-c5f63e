// booth_r8: radix-8 modified Booth encoder and partial-product generator.
//
// The multiplier x, sign extended, is scanned in overlapping 4-bit groups
// (x[3i+2], x[3i+1], x[3i], x[3i-1]), x[-1] = 0, giving ceil((N+1)/3) digits
// d_i = -4 x[3i+2] + 2 x[3i+1] + x[3i] + x[3i-1] in {-4..4}. Row i selects
// 0, y, 2y, 3y or 4y (N+2 bits, sign extended) and inverts it for a negative
// digit; the +1 completing the two's complement leaves as neg[i]. The odd
// multiple 3y = y + 2y is formed once, by a carry lookahead adder, and shared
// by all rows. A zero digit (group 0000 or 1111) gives an all-zero row with
// neg = 0. Purely combinational.
// The digit rule and the one's-complement rows follow the architecture; the
// row width, the encoding signals and the shared 3y adder are this design's.
module booth_r8
  import pmac_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                x,
  input  logic [N-1:0]                y,
  output logic [(N+3)/3-1:0][N+1:0]   pp,
  output logic [(N+3)/3-1:0]          neg
);

  localparam int unsigned R  = (N + 3) / 3;
  localparam int unsigned W  = N + 2;
  localparam int unsigned XW = 3 * R + 1;     // x[-1] plus 3R bits

  logic [W-1:0]  y1, y2, y3, y4;
  logic [XW-1:0] xe;
  booth_r8_t     dig [R];

  assign y1 = {{2{y[N-1]}}, y};
  assign y2 = {y[N-1], y, 1'b0};
  assign y4 = {y, 2'b00};
  assign xe = {{(XW-N-1){x[N-1]}}, x, 1'b0};

  // hard multiple 3y
  cla #(.W(W)) u_y3 (.a (y1), .b (y2), .ci (1'b0), .s (y3), .co ());

  always_comb begin
    for (int i = 0; i < R; i++) begin
      logic [3:0]   grp;
      logic [W-1:0] mag;
      grp = xe[3*i +: 4];                        // {x[3i+2], x[3i+1], x[3i], x[3i-1]}
      dig[i] = '0;
      unique case (grp)
        4'b0001, 4'b0010, 4'b1101, 4'b1110: dig[i].one   = 1'b1;
        4'b0011, 4'b0100, 4'b1011, 4'b1100: dig[i].two   = 1'b1;
        4'b0101, 4'b0110, 4'b1001, 4'b1010: dig[i].three = 1'b1;
        4'b0111, 4'b1000:                   dig[i].four  = 1'b1;
        default: ;                                 // 0000, 1111: digit 0
      endcase
      dig[i].neg = grp[3] & ~(grp[2] & grp[1] & grp[0]);
      mag = ({W{dig[i].one}}   & y1) | ({W{dig[i].two}}  & y2) |
            ({W{dig[i].three}} & y3) | ({W{dig[i].four}} & y4);
      pp[i]  = dig[i].neg ? ~mag : mag;
      neg[i] = dig[i].neg;
    end
  end

endmodule
