// tb_self_checking_fa: checks the fault detection of the self-checking full
// adder. Every input combination (8) is applied with every pair of faults at
// the sum and carry outputs (4 x 4: none, stuck-at-0, stuck-at-1, inverted).
// The expected outputs are worked out here from the arithmetic sum and the
// fault kind; a flag must be 1 exactly when its output differs from the
// correct value. Runs one vector per clock with a 1000-cycle watchdog.
module tb_self_checking_fa;
  import fa_fault_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      a, b, cin, sum, cout, fs, fc;
  fa_fault_t fault;
  int checks   = 0;
  int failures = 0;
  int n_sum_detect = 0, n_carry_detect = 0, n_double_detect = 0;

  self_checking_fa dut (
    .a(a), .b(b), .cin(cin), .fault(fault),
    .sum(sum), .cout(cout), .fs(fs), .fc(fc)
  );

  // Reference fault model, written independently of the package function.
  function automatic logic faulty(input logic good, input int kind);
    case (kind)
      1:       return 1'b0;
      2:       return 1'b1;
      3:       return !good;
      default: return good;
    endcase
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_good, c_good, s_exp, c_exp;
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
          s_exp = faulty(s_good, fsk);
          c_exp = faulty(c_good, fck);
          checks++;
          if (sum !== s_exp || cout !== c_exp) begin
            failures++;
            $display("FAIL outputs v=%0d fs_kind=%0d fc_kind=%0d: sum=%0b cout=%0b", v, fsk, fck, sum, cout);
          end
          checks++;
          if (fs !== (s_exp != s_good)) begin
            failures++;
            $display("FAIL Fs v=%0d fault=%0d: fs=%0b", v, fsk, fs);
          end
          checks++;
          if (fc !== (c_exp != c_good)) begin
            failures++;
            $display("FAIL Fc v=%0d fault=%0d: fc=%0b", v, fck, fc);
          end
          if (fs && !fc) n_sum_detect++;
          if (fc && !fs) n_carry_detect++;
          if (fs && fc)  n_double_detect++;
        end
      end
    end
    $display("sum-only detections=%0d carry-only detections=%0d double detections=%0d",
             n_sum_detect, n_carry_detect, n_double_detect);
    if (n_sum_detect == 0 || n_carry_detect == 0 || n_double_detect == 0) begin
      failures++;
      $display("FAIL a detection case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
