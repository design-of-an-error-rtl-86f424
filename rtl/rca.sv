// rca: ripple-carry adder, the accurate (upper) part of the ETA.
//
// WIDTH one-bit full adders in a chain; each takes as carry in the carry out
// of the adder to its right, so the carry ripples from bit 0 to bit WIDTH-1.
// A ripple-carry adder is used because it is the lowest-power conventional
// adder, and the ETA's delay is set by its inaccurate part, not by this one.
//
// Interface: a, b (WIDTH bits), cin; sum (WIDTH bits), cout. Purely
// combinational. Inside the ETA, cin is tied to 0.
module rca #(
  parameter int unsigned WIDTH = eta_pkg::EtaAccWidth
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // carry[i] is the carry into bit i; carry[WIDTH] is the carry out.
  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
