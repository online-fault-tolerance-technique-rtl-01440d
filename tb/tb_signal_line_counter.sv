// Testbench for signal_line_counter (M = 4): random inc/clear against a
// reference count; the one-hot renew enable must name the current line only
// when inc is high and fewer than M lines are configured.
module tb_signal_line_counter;
  localparam int unsigned M = 4;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         clear, inc, full;
  logic [2:0]   count;
  logic [M-1:0] line_en, exp_en;
  int           model, checks = 0, failures = 0;

  signal_line_counter #(.M(M)) dut (.clk, .rst_n, .clear, .inc, .count, .line_en, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0;
    inc = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      clear = ($urandom_range(15) == 0);
      inc = 1'($urandom);
      #1;
      exp_en = '0;
      if (inc && model < M) exp_en[model] = 1'b1;
      checks++;
      if (int'(count) != model || full != (model == M) || line_en !== exp_en) begin
        failures++;
        $display("count=%0d full=%b en=%b expected %0d %b", count, full, line_en, model, exp_en);
      end
      @(posedge clk);
      if (clear) model = 0;
      else if (inc && model < M) model++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
