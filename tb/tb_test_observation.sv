// Testbench for test_observation (4:2): for random t2 values, SI, status and
// return index it checks every NAND output bit by bit and the returned bit.
module tb_test_observation;
  localparam int unsigned T = 6;

  logic         clk = 1'b0;
  logic [T-1:0] tsv_rx, status, test_result;
  logic         si, ret_bit;
  logic [2:0]   ret_idx;
  int           checks = 0, failures = 0;

  test_observation #(.M(4), .N(2)) dut (.tsv_rx, .si, .status, .ret_idx, .test_result, .ret_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      tsv_rx  = T'($urandom);
      status  = T'($urandom);
      si      = 1'($urandom);
      ret_idx = 3'($urandom_range(T - 1));
      #1;
      for (int j = 0; j < T; j++) begin
        // arrived (1) under test is good (0); not arrived or SI low is faulty (1)
        logic exp_r;
        exp_r = (si && tsv_rx[j]) ? 1'b0 : 1'b1;
        checks++;
        if (test_result[j] !== exp_r) begin
          failures++;
          $display("TSV %0d: t2=%b si=%b result=%b", j, tsv_rx[j], si, test_result[j]);
        end
      end
      checks++;
      if (ret_bit !== status[ret_idx]) begin
        failures++;
        $display("return bit %b for TSV %0d of %b", ret_bit, ret_idx, status);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
