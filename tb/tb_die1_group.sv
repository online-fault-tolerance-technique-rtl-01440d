// Testbench for die1_group (4:2).  The testbench stands in for the vias and
// die 2: whenever exactly one via carries the test transition it notes that
// via's injected fault and returns it one clock later on ret_rx.  Checked:
// the transition visits vias 0..5 in order, one per clock; the run lasts
// 2(M+N)+2 clocks; the status register ends equal to the fault pattern; the
// selects match the reference mapping and data then reaches the right vias
// (unused vias low); error when more than N vias are faulty.
module tb_die1_group;
  import tsv_ft_pkg::*;
  localparam int unsigned M = 4, N = 2, T = 6;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0]      data_in;
  logic [T-1:0]      tsv_tx, status, fault;
  logic              ret_rx, busy, done, error;
  logic [M-1:0][1:0] sel;
  logic [2:0]        faulty_count;
  int                checks = 0, failures = 0;

  die1_group #(.M(M), .N(N)) dut (.clk, .rst_n, .start, .data_in, .tsv_tx, .ret_rx, .busy, .done,
                                   .error, .status, .sel, .faulty_count);

  always #5 clk = ~clk;

  // Die-2 stand-in: judge the via under test, answer one clock later.
  always_ff @(posedge clk) ret_rx <= busy && $onehot(tsv_tx) && |(tsv_tx & fault);

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int cyc, tested, nf, h[$];
    logic [T-1:0] exp_tx;
    data_in = '0;
    fault = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 120; r++) begin
      @(negedge clk);
      fault = (r < 64) ? T'(r) : T'($urandom);
      if (r >= 64 && $countones(fault) > N) fault = fault & T'($urandom);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      tested = 0;
      while (!done && cyc < 40) begin
        data_in = M'($urandom);
        if ($onehot(tsv_tx)) begin
          check(tsv_tx == T'(1) << tested, $sformatf("run %0d: transition on %b, expected via %0d", r, tsv_tx, tested));
          tested++;
        end else check(tsv_tx == '0, $sformatf("run %0d: vias %b during the run", r, tsv_tx));
        @(negedge clk);
        cyc++;
      end
      check(cyc == 2 * T + 3, $sformatf("run %0d: run took %0d clocks", r, cyc - 1));
      check(tested == T, $sformatf("run %0d: %0d vias tested", r, tested));
      check(status == fault, $sformatf("run %0d: status %b expected %b", r, status, fault));
      nf = $countones(fault);
      check(int'(faulty_count) == nf, "faulty count");
      check(error == (nf > N), $sformatf("run %0d: error %b with %0d faults", r, error, nf));
      if (nf <= N) begin
        h.delete();
        for (int j = 0; j < T; j++) if (!fault[j]) h.push_back(j);
        for (int i = 0; i < M; i++) check(int'(sel[i]) == h[i] - i, $sformatf("run %0d line %0d sel %0d", r, i, sel[i]));
        for (int w = 0; w < 4; w++) begin
          @(negedge clk);
          data_in = M'($urandom);
          #1;
          exp_tx = '0;
          for (int i = 0; i < M; i++) exp_tx[h[i]] = data_in[i];
          check(tsv_tx == exp_tx, $sformatf("run %0d: vias %b expected %b", r, tsv_tx, exp_tx));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
