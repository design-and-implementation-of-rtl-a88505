// tb_self_repairing_fa: checks that the self-repairing full adder always
// delivers the correct sum and carry. Every input combination (8) is applied
// with every pair of faults at the cell's sum and carry outputs (4 x 4). The
// repaired outputs must equal a + b + cin whatever the faults, and the flags
// must show which outputs the fault actually corrupted. Counts sum-only,
// carry-only and double repairs and fails if any never happened. One vector
// per clock, 1000-cycle watchdog.
module tb_self_repairing_fa;
  import fa_fault_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      a, b, cin, sum, cout, fs, fc;
  fa_fault_t fault;
  int checks   = 0;
  int failures = 0;
  int n_sum_repair = 0, n_carry_repair = 0, n_double_repair = 0;

  self_repairing_fa dut (
    .a(a), .b(b), .cin(cin), .fault(fault),
    .sum(sum), .cout(cout), .fs(fs), .fc(fc)
  );

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_good, c_good, s_bad, c_bad;
    fault = NO_FAULT;
    for (int v = 0; v < 8; v++) begin
      for (int fsk = 0; fsk < 4; fsk++) begin
        for (int fck = 0; fck < 4; fck++) begin
          @(negedge clk);
          {a, b, cin} = 3'(v);
          fault.sum   = fault_e'(fsk);
          fault.cout  = fault_e'(fck);
          @(posedge clk);
          {c_good, s_good} = 2'(int'(a) + int'(b) + int'(cin));
          // Whether the fault actually corrupts each output.
          s_bad = (fsk == 1 && s_good) || (fsk == 2 && !s_good) || fsk == 3;
          c_bad = (fck == 1 && c_good) || (fck == 2 && !c_good) || fck == 3;
          checks++;
          if (sum !== s_good || cout !== c_good) begin
            failures++;
            $display("FAIL repair v=%0d fs_kind=%0d fc_kind=%0d: sum=%0b cout=%0b", v, fsk, fck, sum, cout);
          end
          checks++;
          if (fs !== s_bad || fc !== c_bad) begin
            failures++;
            $display("FAIL flags v=%0d fs_kind=%0d fc_kind=%0d: fs=%0b fc=%0b", v, fsk, fck, fs, fc);
          end
          if (s_bad && !c_bad) n_sum_repair++;
          if (c_bad && !s_bad) n_carry_repair++;
          if (s_bad && c_bad)  n_double_repair++;
        end
      end
    end
    $display("sum repairs=%0d carry repairs=%0d double repairs=%0d",
             n_sum_repair, n_carry_repair, n_double_repair);
    if (n_sum_repair == 0 || n_carry_repair == 0 || n_double_repair == 0) begin
      failures++;
      $display("FAIL a repair case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
