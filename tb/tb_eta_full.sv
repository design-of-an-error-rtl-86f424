// tb_eta_full: the error-tolerant adder at its default size (32 bits, 12
// accurate + 20 inaccurate, groups of four), with no parameter overridden.
//
// Drives 200000 uniformly random operand pairs, checks every result against
// the bit-serial reference model, and measures the accuracy of each result:
//   ACC = 1 - |Rc - Re| / Rc      (Rc exact sum, Re adder result; 100 % if Rc = 0)
// A result is acceptable when ACC exceeds the minimum acceptable accuracy
// (MAA) of 95 %. The acceptance probability (AP), the fraction of acceptable
// results, must reach 98 %, the example requirement used to choose the split
// between the accurate and inaccurate parts. The mean accuracy and the
// lowest accuracy seen are printed for information.
module tb_eta_full;

  import eta_ref_pkg::*;

  localparam int unsigned W       = 32;
  localparam int unsigned M       = 20;
  localparam int unsigned NVEC    = 200000;
  localparam real         MAA     = 0.95;
  localparam real         AP_MIN  = 0.98;

  logic [W-1:0] a, b, sum;
  logic         cout;
  logic [M-1:0] ctl;

  int  checks = 0;
  int  failures = 0;
  int  accepted = 0;
  int  n_ctl = 0;
  real acc, acc_sum, acc_min, ap;

  eta dut (.a(a), .b(b), .sum(sum), .cout(cout), .ctl(ctl));

  initial begin
    #100000000;
    failures++;
    $display("tb_eta_full: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_sum = 0.0;
    acc_min = 1.0;
    for (int n = 0; n < int'(NVEC); n++) begin
      logic [64:0] expected;
      logic [32:0] exact, result;
      a = $urandom;
      b = $urandom;
      #1;
      expected = eta_ref_sum(64'(a), 64'(b), W, M);
      exact    = {1'b0, a} + {1'b0, b};
      result   = {cout, sum};
      checks++;
      if (result !== expected[W:0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h -> %h, expected %h", a, b, result, expected[W:0]);
      end
      if (ctl != '0) n_ctl++;
      if (exact == 0) acc = 1.0;
      else acc = 1.0 - (real'(exact) - real'(result)) / real'(exact);
      acc_sum += acc;
      if (acc < acc_min) acc_min = acc;
      if (acc > MAA) accepted++;
    end
    ap = real'(accepted) / real'(NVEC);
    $display("vectors=%0d control_asserted=%0d AP(MAA=95%%)=%f mean_ACC=%f min_ACC=%f",
             NVEC, n_ctl, ap, acc_sum / real'(NVEC), acc_min);
    checks++;
    if (ap < AP_MIN) begin
      failures++;
      $display("FAIL acceptance probability %f below %f", ap, AP_MIN);
    end
    checks++;
    if (n_ctl == 0) begin
      failures++;
      $display("FAIL control signals never asserted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
