// tb_modified_xor: exhaustive check of the modified XOR: ctl = 0 gives a ^ b,
// ctl = 1 forces the output to 1.
module tb_modified_xor;

  logic a, b, ctl, sum;
  logic expected;
  int   checks = 0;
  int   failures = 0;

  modified_xor dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  initial begin
    #1000;
    failures++;
    $display("tb_modified_xor: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctl, a, b} = 3'(v);
      #1;
      // Truth table written out: XOR mode, then forced-high mode.
      case ({ctl, a, b})
        3'b000: expected = 1'b0;
        3'b001: expected = 1'b1;
        3'b010: expected = 1'b1;
        3'b011: expected = 1'b0;
        default: expected = 1'b1;
      endcase
      checks++;
      if (sum !== expected) begin
        failures++;
        $display("FAIL ctl=%b a=%b b=%b -> sum=%b, expected %b", ctl, a, b, sum, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
