// eta_pkg: sizes shared by the error-tolerant adder (ETA) and its parts.
//
// The 32-bit ETA is split into a 12-bit accurate (upper) part and a 20-bit
// inaccurate (lower) part. The control cells of the inaccurate part are
// arranged in groups of four, five groups for 20 bits. All three numbers are
// the ones of the published 32-bit design; the modules take them as
// parameter defaults and may be built at other sizes.
package eta_pkg;

  // Total operand width of the adder.
  localparam int unsigned EtaWidth = 32;
  // Width of the inaccurate (carry-free) lower part.
  localparam int unsigned EtaInaccWidth = 20;
  // Width of the accurate (ripple-carry) upper part.
  localparam int unsigned EtaAccWidth = EtaWidth - EtaInaccWidth;
  // Number of control signal generating cells per group.
  localparam int unsigned EtaGroup = 4;

endpackage
