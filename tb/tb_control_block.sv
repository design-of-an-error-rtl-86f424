// tb_control_block: control block at its default size (20 cells, groups of
// four), plus an 8-cell instance (two groups) and a 10-cell instance (short
// top group). Expected: ctl[i] = 1 exactly when some position j >= i has
// a[j] = b[j] = 1, found by scanning from the MSB. Directed cases put the
// only "1 + 1" position at each bit in turn; in the 20-bit block, positions
// in a higher group reach the lower groups through the jump connections.
module tb_control_block;

  import eta_ref_pkg::*;

  localparam int unsigned W = 20;

  logic [W-1:0] a, b, ctl;
  logic [7:0]   a8, b8, ctl8;
  logic [9:0]   a10, b10, ctl10;
  int           checks = 0;
  int           failures = 0;

  control_block dut (.a(a), .b(b), .ctl(ctl));
  control_block #(.WIDTH(8), .GROUP(4)) dut8 (.a(a8), .b(b8), .ctl(ctl8));
  control_block #(.WIDTH(10), .GROUP(4)) dut10 (.a(a10), .b(b10), .ctl(ctl10));

  function automatic logic [63:0] expected_ctl(input logic [63:0] x, input logic [63:0] y,
                                               input int unsigned w);
    logic [63:0] e;
    int          p;
    e = '0;
    p = first_both_one(x, y, w);
    for (int i = 0; i < int'(w); i++) e[i] = (p >= i);
    return e;
  endfunction

  task automatic check();
    #1;
    checks += 3;
    if (64'(ctl) !== expected_ctl(64'(a), 64'(b), W)) begin
      failures++;
      $display("FAIL w=20 a=%h b=%h -> ctl=%h", a, b, ctl);
    end
    if (64'(ctl8) !== expected_ctl(64'(a8), 64'(b8), 8)) begin
      failures++;
      $display("FAIL w=8 a=%h b=%h -> ctl=%h", a8, b8, ctl8);
    end
    if (64'(ctl10) !== expected_ctl(64'(a10), 64'(b10), 10)) begin
      failures++;
      $display("FAIL w=10 a=%h b=%h -> ctl=%h", a10, b10, ctl10);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("tb_control_block: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // No position with both bits 1: all control signals low.
    a = '1; b = '0; a8 = '1; b8 = '0; a10 = '1; b10 = '0; check();
    a = 20'hAAAAA; b = 20'h55555; a8 = 8'hAA; b8 = 8'h55; a10 = 10'h2AA; b10 = 10'h155; check();
    // A single "1 + 1" position at each bit in turn.
    for (int i = 0; i < int'(W); i++) begin
      a = W'(1) << i;  b = a;
      a8 = 8'(a); b8 = 8'(b);
      a10 = 10'(a); b10 = 10'(b);
      check();
    end
    for (int n = 0; n < 5000; n++) begin
      a = W'($urandom); b = W'($urandom);
      // Sparse operands make the first "1 + 1" position fall low as well.
      if (n % 2 == 1) b = b & W'($urandom) & W'($urandom);
      a8 = 8'($urandom); b8 = 8'($urandom) & 8'($urandom);
      a10 = 10'($urandom); b10 = 10'($urandom) & 10'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
