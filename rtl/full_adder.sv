// full_adder: one-bit full adder, the cell of the ripple-carry accurate part.
//
// sum  = a ^ b ^ cin
// cout = majority(a, b, cin)
// Purely combinational. The cell itself is the standard one; its internal
// gate structure is this design's own choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
