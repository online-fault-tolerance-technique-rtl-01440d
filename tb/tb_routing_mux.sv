// Testbench for routing_mux (4:2 and 240:3): random selects in 0..N and
// random TSV values; line i must read TSV i + sel[i].
module tb_routing_mux;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0]         rx_a;
  logic [3:0][1:0]    sel_a;
  logic [3:0]         dout_a;
  routing_mux #(.M(4), .N(2)) dut_a (.tsv_rx(rx_a), .sel(sel_a), .data_out(dout_a));

  logic [242:0]       rx_b;
  logic [239:0][1:0]  sel_b;
  logic [239:0]       dout_b;
  routing_mux #(.M(240), .N(3)) dut_b (.tsv_rx(rx_b), .sel(sel_b), .data_out(dout_b));

  initial begin
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      rx_a = 6'($urandom);
      for (int i = 0; i < 4; i++) sel_a[i] = 2'($urandom_range(2));
      for (int j = 0; j < 243; j++) rx_b[j] = 1'($urandom);
      for (int i = 0; i < 240; i++) sel_b[i] = 2'($urandom_range(3));
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (dout_a[i] !== rx_a[i + int'(sel_a[i])]) begin
          failures++;
          $display("4:2 line %0d sel %0d got %b", i, sel_a[i], dout_a[i]);
        end
      end
      for (int i = 0; i < 240; i++) begin
        checks++;
        if (dout_b[i] !== rx_b[i + int'(sel_b[i])]) begin
          failures++;
          $display("240:3 line %0d sel %0d got %b", i, sel_b[i], dout_b[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
