// csgc: control signal generating cell of the ETA's control block.
//
// A cell raises its control output when its own two input bits are both 1
// (the first "1 + 1" position seen when scanning from the MSB), or when a
// cell to its left has already raised its control signal:
//   type I  : ctl = (a & b) | ctl_left
//   type II : ctl = (a & b) | ctl_left | ctl_jump
// ctl_left is CTL(i+1), from the neighbour on the left. ctl_jump is CTL(i+4),
// from the leftmost cell of the group to the left; it lets a high control
// signal skip a whole group instead of rippling through its cells. Type II
// sits at the leftmost position of each group that has a group to its left.
// TYPE_II selects the cell type; in a type I cell ctl_jump is ignored.
// Combinational.
module csgc #(
  parameter bit TYPE_II = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic ctl_left,
  input  logic ctl_jump,
  output logic ctl
);

  logic both_one;

  always_comb begin
    both_one = a & b;
    if (TYPE_II) ctl = both_one | ctl_left | ctl_jump;
    else         ctl = both_one | ctl_left;
  end

endmodule
