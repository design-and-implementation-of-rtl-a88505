// tb_ft_array_multiplier: end-to-end test of the 4 x 4 fault-tolerant array
// multiplier at its default size. Every product must equal a * b whatever
// faults are placed at the adder cells' outputs. Four phases, all 256
// operand pairs in each of the first three:
//   1. no faults: product correct, no flag raised;
//   2. single faults: each of the 12 cells, at its sum or its carry, stuck
//      at 0, stuck at 1 or inverted; only the faulty cell may flag, and an
//      inverted output must always be flagged;
//   3. double faults: both outputs of one cell faulty at once (9 kinds);
//   4. random faults in many cells at once (4000 vectors).
// The testbench counts how often a sum repair, a carry repair, a double
// repair in one cell and repairs in several cells at once actually happened,
// and fails if any of them never did. One vector per clock, watchdog at
// 200000 cycles.
module tb_ft_array_multiplier;
  import fa_fault_pkg::*;

  localparam int W   = 4;          // the multiplier's default WIDTH
  localparam int NFA = W * (W - 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]   a, b;
  fa_fault_t      fault [NFA];
  logic [2*W-1:0] p;
  logic [NFA-1:0] fs, fc;

  int checks   = 0;
  int failures = 0;
  int n_sum_repair = 0, n_carry_repair = 0, n_double_repair = 0, n_multi_cell = 0;

  ft_array_multiplier dut (.a(a), .b(b), .fault(fault), .p(p), .fs(fs), .fc(fc));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_faults();
    for (int k = 0; k < NFA; k++) fault[k] = NO_FAULT;
  endtask

  // Apply operands (faults already set), wait for the clock, check the
  // product and tally the repairs the flags show.
  task automatic apply_and_check(input int av, input int bv, input string what);
    int cells;
    @(negedge clk);
    a = W'(av);
    b = W'(bv);
    @(posedge clk);
    checks++;
    if (int'(p) != av * bv) begin
      failures++;
      $display("FAIL %s: %0d * %0d gave %0d", what, av, bv, p);
    end
    cells = 0;
    for (int k = 0; k < NFA; k++) begin
      if (fs[k] && !fc[k]) n_sum_repair++;
      if (fc[k] && !fs[k]) n_carry_repair++;
      if (fs[k] && fc[k])  n_double_repair++;
      if (fs[k] || fc[k])  cells++;
    end
    if (cells > 1) n_multi_cell++;
  endtask

  initial begin
    clear_faults();
    a = '0;
    b = '0;

    // 1. Fault-free operation.
    for (int av = 0; av < (1 << W); av++)
      for (int bv = 0; bv < (1 << W); bv++) begin
        apply_and_check(av, bv, "no fault");
        checks++;
        if (fs != '0 || fc != '0) begin
          failures++;
          $display("FAIL no fault: %0d * %0d raised fs=%h fc=%h", av, bv, fs, fc);
        end
      end

    // 2. Single faults.
    for (int k = 0; k < NFA; k++)
      for (int site = 0; site < 2; site++)
        for (int kind = 1; kind < 4; kind++) begin
          clear_faults();
          if (site == 0) fault[k].sum  = fault_e'(kind);
          else           fault[k].cout = fault_e'(kind);
          for (int av = 0; av < (1 << W); av++)
            for (int bv = 0; bv < (1 << W); bv++) begin
              apply_and_check(av, bv, $sformatf("cell %0d site %0d kind %0d", k, site, kind));
              checks++;
              if (((fs | fc) & ~(NFA'(1) << k)) != '0) begin
                failures++;
                $display("FAIL healthy cell flagged: fault in cell %0d, fs=%h fc=%h", k, fs, fc);
              end
              if (kind == 3) begin
                checks++;
                if ((site == 0 && !fs[k]) || (site == 1 && !fc[k])) begin
                  failures++;
                  $display("FAIL inverted output of cell %0d site %0d not flagged", k, site);
                end
              end
            end
        end

    // 3. Double faults: both outputs of one cell.
    for (int k = 0; k < NFA; k++)
      for (int ks = 1; ks < 4; ks++)
        for (int kc = 1; kc < 4; kc++) begin
          clear_faults();
          fault[k].sum  = fault_e'(ks);
          fault[k].cout = fault_e'(kc);
          for (int av = 0; av < (1 << W); av++)
            for (int bv = 0; bv < (1 << W); bv++)
              apply_and_check(av, bv, $sformatf("double fault cell %0d kinds %0d/%0d", k, ks, kc));
        end

    // 4. Random faults in many cells at once.
    for (int n = 0; n < 4000; n++) begin
      for (int k = 0; k < NFA; k++) begin
        fault[k].sum  = fault_e'($urandom_range(3));
        fault[k].cout = fault_e'($urandom_range(3));
      end
      apply_and_check(int'($urandom_range((1 << W) - 1)), int'($urandom_range((1 << W) - 1)),
                      "multi-cell faults");
    end

    $display("sum repairs=%0d carry repairs=%0d double repairs=%0d multi-cell vectors=%0d",
             n_sum_repair, n_carry_repair, n_double_repair, n_multi_cell);
    if (n_sum_repair == 0)    begin failures++; $display("FAIL no sum repair occurred"); end
    if (n_carry_repair == 0)  begin failures++; $display("FAIL no carry repair occurred"); end
    if (n_double_repair == 0) begin failures++; $display("FAIL no double repair occurred"); end
    if (n_multi_cell == 0)    begin failures++; $display("FAIL no multi-cell repair occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
