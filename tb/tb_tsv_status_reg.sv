// Testbench for tsv_status_reg (4:2): random per-bit loads against a
// reference copy kept in the testbench; reset must give all fault-free.
module tb_tsv_status_reg;
  localparam int unsigned T = 6;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [T-1:0] load_en, d, q, model;
  int           checks = 0, failures = 0;

  tsv_status_reg #(.M(4), .N(2)) dut (.clk, .rst_n, .load_en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_en = '0;
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset value %b", q); end
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load_en = T'($urandom);
      d = T'($urandom);
      @(posedge clk);
      for (int j = 0; j < T; j++) if (load_en[j]) model[j] = d[j];
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("q=%b expected %b", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
