// Testbench for die2_group (4:2).  The testbench stands in for die 1 and the
// vias: in test clock t it raises via t unless that via is faulty (an open
// via arrives late, a shorted one never, so both read 0 at the capture edge).
// Checked: each result comes back on ret_tx in the clock after its test; the
// run lasts 2(M+N)+2 clocks; the status register ends equal to the fault
// pattern; the selects match the reference mapping and data_out then reads
// the right vias; error when more than N vias are faulty.
module tb_die2_group;
  import tsv_ft_pkg::*;
  localparam int unsigned M = 4, N = 2, T = 6;

  logic              clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [T-1:0]      tsv_rx, status, fault;
  logic [M-1:0]      data_out;
  logic              ret_tx, busy, done, error;
  logic [M-1:0][1:0] sel;
  logic [2:0]        faulty_count;
  int                checks = 0, failures = 0;

  die2_group #(.M(M), .N(N)) dut (.clk, .rst_n, .start, .tsv_rx, .ret_tx, .data_out, .busy, .done,
                                   .error, .status, .sel, .faulty_count);

  always #5 clk = ~clk;

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
    int cyc, nf, h[$];
    tsv_rx = '0;
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
      // clock 1 is INIT, clocks 2..T+1 test vias 0..T-1
      for (cyc = 1; cyc <= 2 * T + 2; cyc++) begin
        check(busy && !done, $sformatf("run %0d: busy/done wrong at clock %0d", r, cyc));
        if (cyc >= 2 && cyc <= T + 1) tsv_rx = (T'(1) << (cyc - 2)) & ~fault;
        else                          tsv_rx = '0;
        if (cyc >= 3 && cyc <= T + 2)
          check(ret_tx == fault[cyc - 3], $sformatf("run %0d: returned result %b for via %0d", r, ret_tx, cyc - 3));
        else
          check(ret_tx == 1'b0, $sformatf("run %0d: ret_tx high at clock %0d", r, cyc));
        @(negedge clk);
      end
      check(done && !busy, $sformatf("run %0d: no done after %0d clocks", r, 2 * T + 2));
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
          tsv_rx = T'($urandom);
          #1;
          for (int i = 0; i < M; i++)
            check(data_out[i] == tsv_rx[h[i]], $sformatf("run %0d: line %0d read %b", r, i, data_out[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
