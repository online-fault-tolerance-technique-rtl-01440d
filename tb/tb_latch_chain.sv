// Testbench for latch_chain (4:2, k = 2): random renew enables and data
// against a reference copy; reset must give select 0 on every line.
module tb_latch_chain;
  localparam int unsigned M = 4;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0]        en;
  logic [1:0]          d;
  logic [M-1:0][1:0]   sel, model;
  int                  checks = 0, failures = 0;

  latch_chain #(.M(M), .N(2)) dut (.clk, .rst_n, .en, .d, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0;
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sel !== '0) begin failures++; $display("reset value %h", sel); end
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = M'(1) << $urandom_range(M);  // one line or none
      d = 2'($urandom);
      @(posedge clk);
      for (int i = 0; i < M; i++) if (en[i]) model[i] = d;
      #1;
      checks++;
      if (sel !== model) begin
        failures++;
        $display("sel=%h expected %h", sel, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
