// tb_rca: ripple-carry adder at its default width (12 bits). Corner cases,
// both carry-in values, then random operands, each compared with the integer
// sum a + b + cin.
module tb_rca;

  localparam int unsigned W = 12;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;

  rca dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [W:0] expected;
    #1;
    expected = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %h, expected %h", a, b, cin, {cout, sum}, expected);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("tb_rca: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Full-length carry ripple: all ones plus one.
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = 12'd1; cin = 1'b0; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = 12'h555; b = 12'hAAA; cin = 1'b1; check();
    for (int n = 0; n < 20000; n++) begin
      a   = W'($urandom);
      b   = W'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
