// Testbench for the tsv_channel via model: drives random bits into t1 for
// each defect kind and checks t2 against the expected behaviour (same bit,
// bit of the previous clock, or constant 0).
module tb_tsv_channel;
  import tsv_ft_pkg::*;

  logic        clk = 1'b0;
  tsv_defect_e defect;
  logic        t1, t2, prev_t1;
  int          checks = 0, failures = 0;

  tsv_channel dut (.clk, .defect, .t1, .t2);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_t2;
    defect = DEF_NONE;
    t1 = 1'b0;
    @(posedge clk);
    prev_t1 = t1;
    for (int d = 0; d < 3; d++) begin
      defect = tsv_defect_e'(d);
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        t1 = 1'($urandom);
        #1;
        unique case (d)
          0: expect_t2 = t1;
          1: expect_t2 = prev_t1;
          default: expect_t2 = 1'b0;
        endcase
        checks++;
        if (t2 !== expect_t2) begin
          failures++;
          $display("defect %0d: t1=%b prev=%b t2=%b expected %b", d, t1, prev_t1, t2, expect_t2);
        end
        @(posedge clk);
        prev_t1 = t1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
