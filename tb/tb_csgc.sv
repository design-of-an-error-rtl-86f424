// tb_csgc: exhaustive check of both control signal generating cell types.
// Type I:  ctl = (a & b) | ctl_left        (ctl_jump ignored)
// Type II: ctl = (a & b) | ctl_left | ctl_jump
module tb_csgc;

  logic a, b, ctl_left, ctl_jump;
  logic ctl_t1, ctl_t2;
  logic exp_t1, exp_t2;
  int   checks = 0;
  int   failures = 0;

  csgc #(.TYPE_II(1'b0)) dut_t1 (
    .a(a), .b(b), .ctl_left(ctl_left), .ctl_jump(ctl_jump), .ctl(ctl_t1)
  );
  csgc #(.TYPE_II(1'b1)) dut_t2 (
    .a(a), .b(b), .ctl_left(ctl_left), .ctl_jump(ctl_jump), .ctl(ctl_t2)
  );

  initial begin
    #1000;
    failures++;
    $display("tb_csgc: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, ctl_left, ctl_jump} = 4'(v);
      #1;
      exp_t1 = (a == 1'b1 && b == 1'b1) || ctl_left == 1'b1;
      exp_t2 = exp_t1 || ctl_jump == 1'b1;
      checks += 2;
      if (ctl_t1 !== exp_t1) begin
        failures++;
        $display("FAIL type I a=%b b=%b left=%b jump=%b -> %b", a, b, ctl_left, ctl_jump, ctl_t1);
      end
      if (ctl_t2 !== exp_t2) begin
        failures++;
        $display("FAIL type II a=%b b=%b left=%b jump=%b -> %b", a, b, ctl_left, ctl_jump, ctl_t2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
