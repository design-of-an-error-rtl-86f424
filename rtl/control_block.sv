// control_block: generates the mode signals of the carry-free addition block.
//
// ctl[i] is high from the most significant position where a and b are both 1
// down to bit 0, and low above it; with no such position all ctl bits are 0.
// Equivalently ctl[i] = OR over j >= i of (a[j] & b[j]).
//
// Structure: WIDTH control signal generating cells (csgc), cell i feeding
// cell i-1, arranged in groups of GROUP from bit 0 up. The leftmost cell of
// each group that has a group to its left is a type II cell: besides its left
// neighbour it takes the output of the leftmost cell of that higher group
// (GROUP positions further left), so a high signal jumps from group to group.
// The 20-bit, four-per-group arrangement follows the published design. If
// WIDTH is not a multiple of GROUP, the topmost group is the short one and the
// jump into the group below it comes from bit WIDTH-1; that case is this
// design's own extension. The leftmost cell's left input is tied to 0.
//
// Interface: a, b (WIDTH bits); ctl (WIDTH bits). Combinational.
module control_block #(
  parameter int unsigned WIDTH = eta_pkg::EtaInaccWidth,
  parameter int unsigned GROUP = eta_pkg::EtaGroup
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] ctl
);

  // ctl_ext[WIDTH] is the constant 0 seen left of the leftmost cell.
  logic [WIDTH:0] ctl_ext;

  assign ctl_ext[WIDTH] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    // Leftmost cell of a group, with a higher group above it.
    localparam bit IsTypeII = ((i % GROUP) == GROUP - 1) && (i + 1 < WIDTH);
    // Leftmost cell of the next higher group.
    localparam int unsigned JumpSrc = (i + GROUP < WIDTH) ? i + GROUP : WIDTH - 1;

    csgc #(
      .TYPE_II(IsTypeII)
    ) u_csgc (
      .a       (a[i]),
      .b       (b[i]),
      .ctl_left(ctl_ext[i+1]),
      .ctl_jump(IsTypeII ? ctl_ext[JumpSrc] : 1'b0),
      .ctl     (ctl_ext[i])
    );
  end

  assign ctl = ctl_ext[WIDTH-1:0];

endmodule
