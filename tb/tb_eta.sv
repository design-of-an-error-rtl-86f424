// tb_eta: end-to-end test of the error-tolerant adder.
//
// Two instances: the default 32-bit adder (12 accurate + 20 inaccurate bits,
// groups of four) and a 16-bit adder split 8 + 8. The 16-bit one first runs
// the worked example 45978 + 26899, whose result must be a carry out of 1 and
// sum bits 00011100_10011111. Then both get directed and random operands,
// checked against a bit-serial reference model.
//
// Each mechanism of the design is counted and must occur at least once:
//   exact     - no "1 + 1" position in the lower part: pure XOR, exact result
//   ctl_set   - a "1 + 1" position forces lower sum bits to 1
//   jump      - the first "1 + 1" position lies in a higher group and the
//               control signal reaches the lower groups
//   carry_out - the accurate part produces a carry out
//   inexact   - the result differs from the exact sum
// The result must also never exceed the exact sum, and its error must be 0
// without a "1 + 1" position in the lower part and between 1 and 2^(p+1)-1
// when the first such position is p.
module tb_eta;

  import eta_ref_pkg::*;

  localparam int unsigned W  = 32;
  localparam int unsigned M  = 20;
  localparam int unsigned G  = 4;
  localparam int unsigned W2 = 16;
  localparam int unsigned M2 = 8;

  logic [W-1:0]  a, b, sum;
  logic          cout;
  logic [M-1:0]  ctl;
  logic [W2-1:0] a2, b2, sum2;
  logic          cout2;
  logic [M2-1:0] ctl2;

  int checks = 0;
  int failures = 0;
  int n_exact = 0, n_ctl_set = 0, n_jump = 0, n_carry_out = 0, n_inexact = 0;

  eta dut (.a(a), .b(b), .sum(sum), .cout(cout), .ctl(ctl));
  eta #(.WIDTH(W2), .INACC_WIDTH(M2), .GROUP(G)) dut16 (
    .a(a2), .b(b2), .sum(sum2), .cout(cout2), .ctl(ctl2)
  );

  task automatic check32();
    logic [64:0] expected;
    logic [32:0] exact;
    int          p;
    #1;
    expected = eta_ref_sum(64'(a), 64'(b), W, M);
    exact    = {1'b0, a} + {1'b0, b};
    p        = first_both_one(64'(a), 64'(b), M);
    checks++;
    if ({cout, sum} !== expected[W:0]) begin
      failures++;
      $display("FAIL w=32 a=%h b=%h -> %b_%h, expected %h", a, b, cout, sum, expected[W:0]);
    end
    checks++;
    if ({cout, sum} > exact) begin
      failures++;
      $display("FAIL w=32 a=%h b=%h: result above exact sum", a, b);
    end
    // Error bound: 0 without a "1 + 1" position, else 1 .. 2^(p+1)-1.
    checks++;
    if ((p < 0) ? (exact != {cout, sum})
                : ((exact - {cout, sum}) == 0 || (exact - {cout, sum}) >= (33'd1 << (p + 1)))) begin
      failures++;
      $display("FAIL w=32 a=%h b=%h: error %0d outside bound for p=%0d", a, b,
               exact - {cout, sum}, p);
    end
    if (p < 0) n_exact++;
    else n_ctl_set++;
    if (p >= int'(G) && ctl[(p / int'(G)) * int'(G) - 1]) n_jump++;
    if (cout) n_carry_out++;
    if ({cout, sum} != exact) n_inexact++;
  endtask

  task automatic check16();
    logic [64:0] expected;
    #1;
    expected = eta_ref_sum(64'(a2), 64'(b2), W2, M2);
    checks++;
    if ({cout2, sum2} !== expected[W2:0]) begin
      failures++;
      $display("FAIL w=16 a=%h b=%h -> %b_%h, expected %h", a2, b2, cout2, sum2, expected[W2:0]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("tb_eta: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: 1011001110011010 + 0110100100010011.
    a2 = 16'b1011001110011010;
    b2 = 16'b0110100100010011;
    #1;
    checks++;
    if ({cout2, sum2} !== 17'b1_00011100_10011111) begin
      failures++;
      $display("FAIL worked example -> %b_%b", cout2, sum2);
    end
    checks++;
    if (ctl2 !== 8'b00011111) begin
      failures++;
      $display("FAIL worked example ctl=%b", ctl2);
    end
    check16();

    // Directed 32-bit cases.
    a = '0; b = '0; check32();
    a = '1; b = '0; check32();                 // all XOR, exact
    a = '1; b = 32'd1; check32();              // 1 + 1 at bit 0, carry lost
    a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; check32();
    a = 32'h0008_0000; b = 32'h0008_0000; check32();  // 1 + 1 at bit 19, jumps down
    a = 32'hFFF0_0000; b = 32'h0010_0000; check32();  // accurate carry out
    for (int i = 0; i < int'(M); i++) begin
      a = (32'd1 << i) | 32'h0123_4000; b = (32'd1 << i); check32();
    end
    for (int n = 0; n < 20000; n++) begin
      a = $urandom; b = $urandom;
      // Every fourth operand pair has no "1 + 1" position in the lower part.
      if (n % 4 == 0) b = (b & ~a & 32'h000F_FFFF) | (b & 32'hFFF0_0000);
      check32();
      a2 = 16'($urandom); b2 = 16'($urandom);
      check16();
    end

    $display("mechanisms: exact=%0d ctl_set=%0d jump=%0d carry_out=%0d inexact=%0d",
             n_exact, n_ctl_set, n_jump, n_carry_out, n_inexact);
    checks += 5;
    if (n_exact == 0)     begin failures++; $display("FAIL exact case never occurred"); end
    if (n_ctl_set == 0)   begin failures++; $display("FAIL control never asserted"); end
    if (n_jump == 0)      begin failures++; $display("FAIL group jump never occurred"); end
    if (n_carry_out == 0) begin failures++; $display("FAIL carry out never occurred"); end
    if (n_inexact == 0)   begin failures++; $display("FAIL inexact case never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
