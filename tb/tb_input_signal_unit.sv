// Testbench for input_signal_unit (4:2): after pat_load the TSV drives must be
// one-hot on TSV 0, then move up by one TSV per pat_shift and end all-zero;
// with test_mode low they must equal the routed data.
module tb_input_signal_unit;
  localparam int unsigned T = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         test_mode, pat_load, pat_shift;
  logic [T-1:0] data_tsv, tsv_tx;
  int           checks = 0, failures = 0;

  input_signal_unit #(.M(4), .N(2)) dut (.clk, .rst_n, .test_mode, .pat_load, .pat_shift, .data_tsv, .tsv_tx);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [T-1:0] exp_v, input string what);
    checks++;
    if (tsv_tx !== exp_v) begin
      failures++;
      $display("%s: tsv_tx=%b expected %b", what, tsv_tx, exp_v);
    end
  endtask

  initial begin
    test_mode = 1'b0; pat_load = 1'b0; pat_shift = 1'b0; data_tsv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 5; run++) begin
      // normal operation: data passes
      for (int n = 0; n < 10; n++) begin
        @(negedge clk);
        test_mode = 1'b0;
        data_tsv = T'($urandom);
        #1 check(data_tsv, "normal mode");
      end
      // test run
      @(negedge clk);
      test_mode = 1'b1;
      pat_load = 1'b1;
      @(negedge clk);
      pat_load = 1'b0;
      pat_shift = 1'b1;
      for (int t = 0; t < T; t++) begin
        data_tsv = T'($urandom);
        #1 check(T'(1) << t, $sformatf("test clock %0d", t));
        @(negedge clk);
      end
      pat_shift = 1'b0;
      for (int n = 0; n < 3; n++) begin
        #1 check('0, "after last TSV");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
