// Testbench for ft_sequencer at 4:2 and 3:1.  For each run it records the
// phase, index and flags clock by clock and compares them with the expected
// schedule: 1 INIT, T TEST (idx 0..T-1), 1 DRAIN, T REPAIR, then done; a run
// lasts 2T+2 clocks from the start edge.  A start pulse during a run must be
// ignored.
module tb_ft_sequencer;
  import tsv_ft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t: %s", $time, what);
    end
  endtask

  // ---- 4:2 instance ----
  localparam int unsigned TA = 6;
  logic      start_a;
  ft_phase_e phase_a;
  logic [2:0] idx_a, cap_idx_a;
  logic cap_valid_a, si_a, busy_a, done_a;
  ft_sequencer #(.M(4), .N(2)) dut_a (
    .clk, .rst_n, .start(start_a), .phase(phase_a), .idx(idx_a), .cap_valid(cap_valid_a),
    .cap_idx(cap_idx_a), .si(si_a), .busy(busy_a), .done(done_a));

  // ---- 3:1 instance ----
  localparam int unsigned TB = 4;
  logic      start_b;
  ft_phase_e phase_b;
  logic [1:0] idx_b, cap_idx_b;
  logic cap_valid_b, si_b, busy_b, done_b;
  ft_sequencer #(.M(3), .N(1)) dut_b (
    .clk, .rst_n, .start(start_b), .phase(phase_b), .idx(idx_b), .cap_valid(cap_valid_b),
    .cap_idx(cap_idx_b), .si(si_b), .busy(busy_b), .done(done_b));

  // Expected phase and index c clocks after the start edge (c >= 1).
  function automatic void expected(input int t, input int c, output ft_phase_e ph, output int ix);
    if (c == 1)                 begin ph = PH_INIT;   ix = 0;         end
    else if (c <= t + 1)        begin ph = PH_TEST;   ix = c - 2;     end
    else if (c == t + 2)        begin ph = PH_DRAIN;  ix = 0;         end
    else if (c <= 2 * t + 2)    begin ph = PH_REPAIR; ix = c - t - 3; end
    else                        begin ph = PH_IDLE;   ix = 0;         end
  endfunction

  initial begin
    ft_phase_e ph;
    int ix, prev_ix;
    bit prev_test;
    start_a = 1'b0;
    start_b = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      check(phase_a == PH_IDLE && !busy_a && phase_b == PH_IDLE && !busy_b, "not idle before start");
      start_a = 1'b1;
      start_b = 1'b1;
      @(negedge clk);
      start_a = 1'b0;
      start_b = 1'b0;
      prev_test = 1'b0;
      prev_ix = 0;
      for (int c = 1; c <= 2 * TA + 3; c++) begin
        expected(TA, c, ph, ix);
        check(phase_a == ph, $sformatf("4:2 clock %0d phase %0d expected %0d", c, phase_a, ph));
        if (ph == PH_TEST || ph == PH_REPAIR)
          check(int'(idx_a) == ix, $sformatf("4:2 clock %0d idx %0d expected %0d", c, idx_a, ix));
        check(si_a == (ph == PH_TEST), "4:2 si");
        check(busy_a == (ph != PH_IDLE), "4:2 busy");
        check(done_a == (c == 2 * TA + 3), $sformatf("4:2 done at clock %0d", c));
        check(cap_valid_a == prev_test, "4:2 cap_valid");
        if (prev_test) check(int'(cap_idx_a) == prev_ix, "4:2 cap_idx");
        prev_test = (ph == PH_TEST);
        prev_ix = ix;
        expected(TB, c, ph, ix);
        check(phase_b == ph, $sformatf("3:1 clock %0d phase %0d expected %0d", c, phase_b, ph));
        if (ph == PH_TEST || ph == PH_REPAIR)
          check(int'(idx_b) == ix, "3:1 idx");
        check(done_b == (c == 2 * TB + 3), "3:1 done");
        // a start during the run must be ignored
        if (c == 4) start_a = 1'b1;
        @(negedge clk);
        start_a = 1'b0;
      end
      check(phase_a == PH_IDLE, "4:2 not idle after run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
