// Testbench for recovery_block.  4:2: every one of the 64 status patterns;
// 80:2: random patterns with up to four faulty TSVs.  The expected routing is
// worked out directly: line i goes to the i-th fault-free TSV, so its select
// is that TSV's index minus i; error when more than N TSVs are faulty (the
// selects are then not checked).  A walk takes exactly M+N step clocks.
module tb_recovery_block;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---- 4:2 ----
  logic             clear_a, step_a, error_a;
  logic [2:0]       idx_a, faulty_a, lines_a;
  logic [5:0]       status_a;
  logic [3:0][1:0]  sel_a;
  recovery_block #(.M(4), .N(2)) dut_a (
    .clk, .rst_n, .clear(clear_a), .step(step_a), .idx(idx_a), .status(status_a),
    .sel(sel_a), .faulty_count(faulty_a), .lines_done(lines_a), .error(error_a));

  // ---- 80:2 ----
  logic              clear_b, step_b, error_b;
  logic [6:0]        idx_b, faulty_b, lines_b;
  logic [81:0]       status_b;
  logic [79:0][1:0]  sel_b;
  recovery_block #(.M(80), .N(2)) dut_b (
    .clk, .rst_n, .clear(clear_b), .step(step_b), .idx(idx_b), .status(status_b),
    .sel(sel_b), .faulty_count(faulty_b), .lines_done(lines_b), .error(error_b));

  initial begin
    int h[$];
    int nf;
    clear_a = 0; step_a = 0; idx_a = '0; status_a = '0;
    clear_b = 0; step_b = 0; idx_b = '0; status_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 64; p++) begin
      @(negedge clk);
      status_a = 6'(p);
      clear_a = 1'b1;
      @(negedge clk);
      clear_a = 1'b0;
      for (int j = 0; j < 6; j++) begin
        step_a = 1'b1;
        idx_a = 3'(j);
        @(negedge clk);
      end
      step_a = 1'b0;
      h.delete();
      for (int j = 0; j < 6; j++) if (!status_a[j]) h.push_back(j);
      nf = 6 - h.size();
      check(int'(faulty_a) == nf, $sformatf("4:2 pattern %b: faulty %0d", status_a, faulty_a));
      check(error_a == (nf > 2), $sformatf("4:2 pattern %b: error %b", status_a, error_a));
      check(int'(lines_a) == ((h.size() < 4) ? h.size() : 4), "4:2 lines configured");
      if (nf <= 2)
        for (int i = 0; i < 4; i++)
          check(int'(sel_a[i]) == h[i] - i,
                $sformatf("4:2 pattern %b line %0d sel %0d expected %0d", status_a, i, sel_a[i], h[i] - i));
    end
    for (int r = 0; r < 40; r++) begin
      @(negedge clk);
      status_b = '0;
      for (int f = 0; f < r % 5; f++) status_b[$urandom_range(81)] = 1'b1;
      clear_b = 1'b1;
      @(negedge clk);
      clear_b = 1'b0;
      for (int j = 0; j < 82; j++) begin
        step_b = 1'b1;
        idx_b = 7'(j);
        @(negedge clk);
      end
      step_b = 1'b0;
      h.delete();
      for (int j = 0; j < 82; j++) if (!status_b[j]) h.push_back(j);
      nf = 82 - h.size();
      check(error_b == (nf > 2), "80:2 error");
      check(int'(faulty_b) == nf, "80:2 faulty count");
      if (nf <= 2)
        for (int i = 0; i < 80; i++)
          check(int'(sel_b[i]) == h[i] - i, $sformatf("80:2 line %0d sel %0d", i, sel_b[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
