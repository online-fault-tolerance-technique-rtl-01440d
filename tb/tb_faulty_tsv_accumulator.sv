// Testbench for faulty_tsv_accumulator (4:2): random walks of status bits
// with clears; the count must equal the number of faulty bits stepped over.
module tb_faulty_tsv_accumulator;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear, en, faulty;
  logic [2:0] count;
  int         model, checks = 0, failures = 0;

  faulty_tsv_accumulator #(.M(4), .N(2)) dut (.clk, .rst_n, .clear, .en, .faulty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; en = 1'b0; faulty = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 100; run++) begin
      @(negedge clk);
      clear = 1'b1;
      en = 1'b0;
      @(negedge clk);
      clear = 1'b0;
      model = 0;
      // a walk over the six TSVs of the group, with random idle clocks
      for (int j = 0; j < 6; j++) begin
        en = 1'b1;
        faulty = 1'($urandom);
        if (faulty) model++;
        @(negedge clk);
        en = 1'b0;
        faulty = 1'($urandom);
        checks++;
        if (int'(count) != model) begin
          failures++;
          $display("count=%0d expected %0d", count, model);
        end
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
