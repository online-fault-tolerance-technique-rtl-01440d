// End-to-end testbench of tsv_ft_top at its default size (grouping ratio
// 4:2).  tsv_group_driver injects via defects, runs detection and recovery
// repeatedly and checks detection, routing, the error flag, data transfer and
// the 2(M+N)+2-clock run length; this module adds the clock and a watchdog.
module tb_tsv_ft_top;
  import tsv_ft_pkg::*;

  localparam int unsigned M = 4;
  localparam int unsigned N = 2;
  localparam int unsigned T = M + N;
  localparam int unsigned K = sel_width(N);
  localparam int unsigned AW = cnt_width(T);

  logic                clk = 1'b0;
  logic                rst_n, ft_start, busy, done, error_die1, error_die2;
  logic [M-1:0]        data_in, data_out;
  tsv_defect_e         tsv_defect [T];
  tsv_defect_e         ret_defect [2];
  logic [T-1:0]        status_die1, status_die2;
  logic [M-1:0][K-1:0] sel_die1, sel_die2;
  logic [AW-1:0]       faulty_die1, faulty_die2;
  int                  checks, failures;
  bit                  finished;

  always #5 clk = ~clk;

  tsv_ft_top dut (.*);

  tsv_group_driver #(.M(M), .N(N), .RUNS(60), .NAME("default group")) drv (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
