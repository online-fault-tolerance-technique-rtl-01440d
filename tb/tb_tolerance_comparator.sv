// Testbench for tolerance_comparator at 4:2 and 80:2: every count from 0 to
// M+N; error only above N.
module tb_tolerance_comparator;
  logic       clk = 1'b0;
  logic [2:0] count_a;
  logic [6:0] count_b;
  logic       error_a, error_b;
  int         checks = 0, failures = 0;

  tolerance_comparator #(.M(4),  .N(2)) dut_a (.count(count_a), .error(error_a));
  tolerance_comparator #(.M(80), .N(2)) dut_b (.count(count_b), .error(error_b));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= 6; c++) begin
      count_a = 3'(c);
      #1;
      checks++;
      if (error_a !== (c >= 3)) begin failures++; $display("4:2 count %0d error %b", c, error_a); end
    end
    for (int c = 0; c <= 82; c++) begin
      count_b = 7'(c);
      #1;
      checks++;
      if (error_b !== (c >= 3)) begin failures++; $display("80:2 count %0d error %b", c, error_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
