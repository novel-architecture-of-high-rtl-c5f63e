// bec: W-bit binary to excess-1 converter.
//
// In the carry select final adder each group is added once, with carry in 0.
// Instead of a second adder for carry in 1, this block derives that result
// from the first by adding one: bit i flips when all lower bits are 1, and
// the group's carry out for carry in 1 is the carry-in-0 carry out or an
// all-ones sum. Purely combinational.
// The BEC's role is the architecture's; its gate form is the usual one.
module bec #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] b,   // group sum for carry in 0
  input  logic         bc,  // group carry out for carry in 0
  output logic [W-1:0] e,   // group sum for carry in 1
  output logic         ec   // group carry out for carry in 1
);

  always_comb begin
    logic run;  // AND of all bits below position i
    run = 1'b1;
    for (int i = 0; i < W; i++) begin
      e[i] = b[i] ^ run;
      run  = run & b[i];
    end
    ec = bc | run;
  end

endmodule
