// Testbench for routing_demux (4:2 and 80:2): random legal selects that
// never put two lines on one TSV (as the recovery control produces them);
// each TSV must carry the bit of the line whose index plus select names it,
// and 0 if none does.
module tb_routing_demux;
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

  logic [3:0]        din_a;
  logic [3:0][1:0]   sel_a;
  logic [5:0]        tsv_a;
  routing_demux #(.M(4), .N(2)) dut_a (.data_in(din_a), .sel(sel_a), .tsv_data(tsv_a));

  logic [79:0]       din_b;
  logic [79:0][1:0]  sel_b;
  logic [81:0]       tsv_b;
  routing_demux #(.M(80), .N(2)) dut_b (.data_in(din_b), .sel(sel_b), .tsv_data(tsv_b));

  // Non-decreasing selects in 0..n: what the recovery control can produce.
  function automatic void make_sel(input int m, input int n, ref int s[]);
    int cur = 0;
    s = new[m];
    for (int i = 0; i < m; i++) begin
      if (cur < n && $urandom_range(7) == 0) cur += $urandom_range(n - cur, 1);
      s[i] = cur;
    end
  endfunction

  initial begin
    int s[];
    logic e;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      make_sel(4, 2, s);
      for (int i = 0; i < 4; i++) sel_a[i] = 2'(s[i]);
      din_a = 4'($urandom);
      make_sel(80, 2, s);
      for (int i = 0; i < 80; i++) sel_b[i] = 2'(s[i]);
      din_b = {$urandom, $urandom, $urandom};
      #1;
      for (int j = 0; j < 6; j++) begin
        e = 1'b0;
        for (int i = (j > 2 ? j - 2 : 0); i <= j && i < 4; i++)
          if (int'(sel_a[i]) == j - i) e = din_a[i];
        checks++;
        if (tsv_a[j] !== e) begin failures++; $display("4:2 TSV %0d = %b expected %b", j, tsv_a[j], e); end
      end
      for (int j = 0; j < 82; j++) begin
        e = 1'b0;
        for (int i = (j > 2 ? j - 2 : 0); i <= j && i < 80; i++)
          if (int'(sel_b[i]) == j - i) e = din_b[i];
        checks++;
        if (tsv_b[j] !== e) begin failures++; $display("80:2 TSV %0d = %b expected %b", j, tsv_b[j], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
