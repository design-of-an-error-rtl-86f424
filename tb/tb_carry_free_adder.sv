// tb_carry_free_adder: the 20-bit carry-free addition block with arbitrary
// (not only well-formed) control vectors: every bit must be a ^ b where its
// control bit is 0 and 1 where it is 1, with no effect between positions.
module tb_carry_free_adder;

  localparam int unsigned W = 20;

  logic [W-1:0] a, b, ctl, sum;
  int           checks = 0;
  int           failures = 0;

  carry_free_adder dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  task automatic check();
    logic [W-1:0] expected;
    #1;
    for (int i = 0; i < int'(W); i++) expected[i] = ctl[i] ? 1'b1 : (a[i] != b[i]);
    checks++;
    if (sum !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h -> %h, expected %h", a, b, ctl, sum, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("tb_carry_free_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // All ones in both operands: no carry may appear anywhere.
    a = '1; b = '1; ctl = '0; check();
    a = '1; b = '0; ctl = '0; check();
    a = '0; b = '0; ctl = '1; check();
    // One control bit at a time.
    for (int i = 0; i < int'(W); i++) begin
      a = '1; b = '1; ctl = W'(1) << i; check();
    end
    for (int n = 0; n < 5000; n++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      ctl = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
