// modified_xor: one sum bit of the carry-free addition block.
//
// In silicon this is an XOR gate with three extra transistors: two that cut
// the XOR off its supply and ground when CTL is high, and one that then pulls
// the output to VDD. Its logic function is what is modelled here:
//   ctl = 0 : sum = a ^ b   (normal XOR, no carry in or out)
//   ctl = 1 : sum = 1       (output forced high)
// The supply gating saves power in a custom cell; a synthesized netlist just
// gets the equivalent logic. Purely combinational.
module modified_xor (
  input  logic a,
  input  logic b,
  input  logic ctl,
  output logic sum
);

  always_comb begin
    if (ctl) sum = 1'b1;
    else     sum = a ^ b;
  end

endmodule
