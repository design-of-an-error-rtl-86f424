// eta_ref_pkg: bit-serial reference model of the error-tolerant addition,
// used by the testbenches to compute expected values independently of the
// RTL structure.
//
// eta_ref_sum follows the addition rule step by step: the upper w-m bits are
// added as integers (carry in 0), the lower m bits are scanned from bit m-1
// down to bit 0; each position gives a ^ b until the first position with both
// bits 1, from where all remaining sum bits are 1. Bit w of the result is the
// carry out of the upper part. Widths up to 64 bits.
package eta_ref_pkg;

  function automatic logic [64:0] eta_ref_sum(input logic [63:0] a,
                                              input logic [63:0] b,
                                              input int unsigned w,
                                              input int unsigned m);
    logic [64:0] res;
    logic [64:0] upper;
    logic        all_ones;
    logic [63:0] mask_u;
    res      = '0;
    all_ones = 1'b0;
    // Lower part, MSB to LSB.
    for (int i = int'(m) - 1; i >= 0; i--) begin
      if (!all_ones && a[i] && b[i]) all_ones = 1'b1;
      res[i] = all_ones ? 1'b1 : (a[i] ^ b[i]);
    end
    // Upper part, exact addition with carry in 0.
    mask_u = (w - m >= 64) ? '1 : ((64'd1 << (w - m)) - 64'd1);
    upper  = {1'b0, (a >> m) & mask_u} + {1'b0, (b >> m) & mask_u};
    res    = res | (upper << m);
    return res;
  endfunction

  // Position of the first (most significant) lower-part bit with a = b = 1,
  // or -1 if there is none.
  function automatic int first_both_one(input logic [63:0] a,
                                        input logic [63:0] b,
                                        input int unsigned m);
    for (int i = int'(m) - 1; i >= 0; i--) begin
      if (a[i] && b[i]) return i;
    end
    return -1;
  endfunction

endpackage
