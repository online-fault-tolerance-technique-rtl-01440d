// Stimulus and checking for a complete TSV group (tsv_ft_top) of grouping
// ratio M:N, shared by the end-to-end testbenches.
//
// Each run injects a set of via defects, pulses ft_start and then checks:
//   * busy stays high for exactly 2(M+N)+2 clocks and done pulses at the end;
//   * both status registers equal the injected defect pattern (open and short
//     vias alike), and both faulty counts equal its size;
//   * error on both dies exactly when more than N vias are defective;
//   * otherwise both dies hold the same selects, equal to the reference
//     mapping (line i on the i-th healthy via), and random data crosses
//     from data_in to data_out unchanged.
// The run schedule cycles through: no defect, one open, one short, N mixed
// defects, N+1 defects (beyond the tolerance), and random defects with one
// return via defective.  Every run after the first is a re-test of a group
// that has already been repaired (online operation).  Each mechanism must
// occur at least once or a failure is counted.  Results are reported through
// checks/failures and finished.
module tsv_group_driver
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M    = 4,
  parameter  int unsigned N    = 2,
  parameter  int unsigned RUNS = 36,
  parameter  string       NAME = "group",
  localparam int unsigned T    = M + N,
  localparam int unsigned K    = sel_width(N),
  localparam int unsigned AW   = cnt_width(T)
) (
  input  logic                clk,
  output logic                rst_n,
  output logic                ft_start,
  output logic [M-1:0]        data_in,
  input  logic [M-1:0]        data_out,
  output tsv_defect_e         tsv_defect [T],
  output tsv_defect_e         ret_defect [2],
  input  logic                busy,
  input  logic                done,
  input  logic                error_die1,
  input  logic                error_die2,
  input  logic [T-1:0]        status_die1,
  input  logic [T-1:0]        status_die2,
  input  logic [M-1:0][K-1:0] sel_die1,
  input  logic [M-1:0][K-1:0] sel_die2,
  input  logic [AW-1:0]       faulty_die1,
  input  logic [AW-1:0]       faulty_die2,
  output int                  checks,
  output int                  failures,
  output bit                  finished
);

  int n_open_detected, n_short_detected, n_reroute, n_tolerance_error;
  int n_return_via_masked, n_retest, n_data_words;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s %t: %s", NAME, $time, what);
    end
  endtask

  // Random data on a bus of any width.
  function automatic logic [M-1:0] rand_data();
    logic [M-1:0] v;
    for (int i = 0; i < M; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  initial begin
    logic [T-1:0] mask;
    int nf, nwant, cyc, pick, h[$];
    bit ret_bad, sel_ok;

    checks = 0; failures = 0; finished = 1'b0;
    n_open_detected = 0; n_short_detected = 0; n_reroute = 0; n_tolerance_error = 0;
    n_return_via_masked = 0; n_retest = 0; n_data_words = 0;
    rst_n = 1'b0; ft_start = 1'b0; data_in = '0;
    for (int j = 0; j < T; j++) tsv_defect[j] = DEF_NONE;
    ret_defect[0] = DEF_NONE;
    ret_defect[1] = DEF_NONE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Before any run: identity routing over healthy vias.
    repeat (4) begin
      @(negedge clk);
      data_in = rand_data();
      #1 check(data_out == data_in, "identity routing after reset");
    end

    for (int r = 0; r < RUNS; r++) begin
      // ---- choose and inject the defects ----
      unique case (r % 6)
        0: nwant = 0;
        1, 2: nwant = 1;
        3: nwant = N;
        4: nwant = N + 1;
        default: nwant = $urandom_range(N);
      endcase
      mask = '0;
      for (int j = 0; j < T; j++) tsv_defect[j] = DEF_NONE;
      nf = 0;
      while (nf < nwant) begin
        pick = $urandom_range(T - 1);
        if (!mask[pick]) begin
          mask[pick] = 1'b1;
          nf++;
          if (r % 6 == 1)      tsv_defect[pick] = DEF_OPEN;
          else if (r % 6 == 2) tsv_defect[pick] = DEF_SHORT;
          else                 tsv_defect[pick] = ($urandom_range(1) == 0) ? DEF_OPEN : DEF_SHORT;
        end
      end
      ret_bad = (r % 6 == 5) || ($urandom_range(3) == 0);
      ret_defect[0] = DEF_NONE;
      ret_defect[1] = DEF_NONE;
      if (ret_bad) ret_defect[$urandom_range(1)] = ($urandom_range(1) == 0) ? DEF_OPEN : DEF_SHORT;

      // ---- run detection and recovery ----
      @(negedge clk);
      data_in = rand_data();
      ft_start = 1'b1;
      @(negedge clk);
      ft_start = 1'b0;
      cyc = 1;
      while (!done && cyc < 4 * T + 10) begin
        check(busy, $sformatf("run %0d: busy low at clock %0d", r, cyc));
        data_in = rand_data();
        @(negedge clk);
        cyc++;
      end
      check(done, $sformatf("run %0d: no done", r));
      check(cyc == 2 * T + 3, $sformatf("run %0d: done after %0d clocks, expected %0d", r, cyc - 1, 2 * T + 2));
      check(!busy, $sformatf("run %0d: busy with done", r));
      if (r > 0) n_retest++;

      // ---- detection results ----
      check(status_die2 == mask, $sformatf("run %0d: die 2 status %b expected %b", r, status_die2, mask));
      check(status_die1 == mask, $sformatf("run %0d: die 1 status %b expected %b", r, status_die1, mask));
      check(int'(faulty_die1) == nf && int'(faulty_die2) == nf, $sformatf("run %0d: faulty counts", r));
      for (int j = 0; j < T; j++) begin
        if (tsv_defect[j] == DEF_OPEN && status_die1[j] && status_die2[j]) n_open_detected++;
        if (tsv_defect[j] == DEF_SHORT && status_die1[j] && status_die2[j]) n_short_detected++;
      end
      if (ret_bad && status_die1 == mask && nf > 0) n_return_via_masked++;

      // ---- recovery results ----
      check(error_die1 == (nf > N) && error_die2 == (nf > N),
            $sformatf("run %0d: %0d defects, error %b/%b", r, nf, error_die1, error_die2));
      if (nf > N) begin
        if (error_die1 && error_die2) n_tolerance_error++;
      end else begin
        h.delete();
        for (int j = 0; j < T; j++) if (!mask[j]) h.push_back(j);
        sel_ok = 1'b1;
        for (int i = 0; i < M; i++)
          if (int'(sel_die1[i]) != h[i] - i || int'(sel_die2[i]) != h[i] - i) sel_ok = 1'b0;
        check(sel_ok, $sformatf("run %0d: selects differ from the reference mapping", r));
        for (int w = 0; w < 8; w++) begin
          @(negedge clk);
          data_in = rand_data();
          #1 check(data_out == data_in, $sformatf("run %0d: data %h arrived as %h", r, data_in, data_out));
          n_data_words++;
        end
        if (nf > 0 && sel_ok) n_reroute++;
      end
    end

    check(n_open_detected > 0, "no open via was ever detected");
    check(n_short_detected > 0, "no shorted via was ever detected");
    check(n_reroute > 0, "no run rerouted around a defective via");
    check(n_tolerance_error > 0, "tolerance error never raised");
    check(n_return_via_masked > 0, "no run with a defective return via");
    check(n_retest > 0, "no re-test of a repaired group");
    $display("%s %0d:%0d: runs=%0d open_detected=%0d short_detected=%0d reroutes=%0d tolerance_errors=%0d return_via_masked=%0d retests=%0d data_words=%0d",
             NAME, M, N, RUNS, n_open_detected, n_short_detected, n_reroute, n_tolerance_error,
             n_return_via_masked, n_retest, n_data_words);
    finished = 1'b1;
  end

endmodule
