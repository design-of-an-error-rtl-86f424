// eta: error-tolerant adder (ETA), top level.
//
// The operands are split at bit M = INACC_WIDTH. The upper WIDTH-M bits (the
// accurate part) are added exactly by a ripple-carry adder whose carry in is
// grounded. The lower M bits (the inaccurate part) are added with no carry at
// all: scanning from bit M-1 down, each sum bit is a[i] ^ b[i] until the first
// position where a[i] and b[i] are both 1; from that position down to bit 0
// every sum bit is 1. Both parts start at the split point and work outwards,
// so the carry chain is at most WIDTH-M bits long and the lower part has no
// chain beyond the control signal, which jumps across groups of GROUP cells.
//
// The result is never larger than the exact sum and differs from it only by
// the carry that the lower part drops and the bits it rounds up to 1. The
// defaults (32 bits, 20 inaccurate, groups of four) are those of the
// published 32-bit design.
//
// Interface: a, b (WIDTH bits); sum (WIDTH bits); cout, the carry out of the
// accurate part; ctl, the inaccurate part's control signals, brought out
// for observation (an addition of this design). Purely combinational: no
// clock, no reset; the outputs settle one adder delay after the inputs.
module eta #(
  parameter int unsigned WIDTH       = eta_pkg::EtaWidth,
  parameter int unsigned INACC_WIDTH = eta_pkg::EtaInaccWidth,
  parameter int unsigned GROUP       = eta_pkg::EtaGroup
) (
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout,
  output logic [INACC_WIDTH-1:0] ctl
);

  localparam int unsigned AccWidth = WIDTH - INACC_WIDTH;

  // Accurate part: conventional adder, carry in connected to ground.
  rca #(
    .WIDTH(AccWidth)
  ) u_accurate (
    .a   (a[WIDTH-1:INACC_WIDTH]),
    .b   (b[WIDTH-1:INACC_WIDTH]),
    .cin (1'b0),
    .sum (sum[WIDTH-1:INACC_WIDTH]),
    .cout(cout)
  );

  // Inaccurate part: control block followed by the carry-free addition block.
  control_block #(
    .WIDTH(INACC_WIDTH),
    .GROUP(GROUP)
  ) u_control (
    .a  (a[INACC_WIDTH-1:0]),
    .b  (b[INACC_WIDTH-1:0]),
    .ctl(ctl)
  );

  carry_free_adder #(
    .WIDTH(INACC_WIDTH)
  ) u_carry_free (
    .a  (a[INACC_WIDTH-1:0]),
    .b  (b[INACC_WIDTH-1:0]),
    .ctl(ctl),
    .sum(sum[INACC_WIDTH-1:0])
  );

  initial begin
    assert (INACC_WIDTH >= 1 && INACC_WIDTH < WIDTH)
      else $error("eta: INACC_WIDTH must be between 1 and WIDTH-1");
    assert (GROUP >= 1)
      else $error("eta: GROUP must be at least 1");
  end

endmodule
