// Testbench for the double TSV return path: every pair of via defects with at
// least one healthy via must deliver tx unchanged; two shorted vias must read
// 0 (the case the redundancy cannot cover).
module tb_double_tsv;
  import tsv_ft_pkg::*;

  logic        clk = 1'b0;
  tsv_defect_e defect [2];
  logic        tx, rx;
  int          checks = 0, failures = 0;

  double_tsv dut (.clk, .defect, .tx, .rx);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx = 1'b0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        defect[0] = tsv_defect_e'(a);
        defect[1] = tsv_defect_e'(b);
        for (int n = 0; n < 50; n++) begin
          @(negedge clk);
          tx = 1'($urandom);
          #1;
          if (a == 0 || b == 0) begin
            checks++;
            if (rx !== tx) begin
              failures++;
              $display("defects %0d/%0d: tx=%b rx=%b", a, b, tx, rx);
            end
          end else if (a == 2 && b == 2) begin
            checks++;
            if (rx !== 1'b0) begin
              failures++;
              $display("two shorted vias: rx=%b", rx);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
