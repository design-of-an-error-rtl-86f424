// carry_free_adder: the carry-free addition block of the ETA's inaccurate part.
//
// One modified XOR per bit: sum[i] = ctl[i] ? 1 : a[i] ^ b[i]. No carry is
// generated or taken in at any position, so there is no carry chain at all.
// The ctl vector comes from control_block.
//
// Interface: a, b, ctl (WIDTH bits each); sum (WIDTH bits). Combinational.
module carry_free_adder #(
  parameter int unsigned WIDTH = eta_pkg::EtaInaccWidth
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] ctl,
  output logic [WIDTH-1:0] sum
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    modified_xor u_mxor (
      .a  (a[i]),
      .b  (b[i]),
      .ctl(ctl[i]),
      .sum(sum[i])
    );
  end

endmodule
