// Runs the grouping ratios used for the evaluated benchmark designs through
// the complete group (tsv_ft_top): 80:2 (aes_core, ethernet, des_perf and the
// 1000-signal comparison), 240:3 (vga_lcd, netcard) and 40:1 (the smaller
// group that completes 1000 signals with 25 spares).  Each group goes
// through the same defect schedule and checks as the default-size test,
// including the 2(m+n)+2-clock run length (166, 488 and 84 clocks).
module tb_tsv_ft_workloads;
  import tsv_ft_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // ---- 80:2 ----
  localparam int unsigned MA = 80, NA = 2, TA = MA + NA, KA = sel_width(NA), AWA = cnt_width(TA);
  logic                  rst_n_a, start_a, busy_a, done_a, err1_a, err2_a;
  logic [MA-1:0]         din_a, dout_a;
  tsv_defect_e           def_a [TA];
  tsv_defect_e           rdef_a [2];
  logic [TA-1:0]         st1_a, st2_a;
  logic [MA-1:0][KA-1:0] sel1_a, sel2_a;
  logic [AWA-1:0]        f1_a, f2_a;
  int                    checks_a, failures_a;
  bit                    fin_a;

  tsv_ft_top #(.M(MA), .N(NA)) dut_a (
    .clk, .rst_n(rst_n_a), .ft_start(start_a), .data_in(din_a), .data_out(dout_a), .tsv_defect(def_a),
    .ret_defect(rdef_a), .busy(busy_a), .done(done_a), .error_die1(err1_a), .error_die2(err2_a),
    .status_die1(st1_a), .status_die2(st2_a), .sel_die1(sel1_a), .sel_die2(sel2_a),
    .faulty_die1(f1_a), .faulty_die2(f2_a));
  tsv_group_driver #(.M(MA), .N(NA), .RUNS(24), .NAME("ratio")) drv_a (
    .clk, .rst_n(rst_n_a), .ft_start(start_a), .data_in(din_a), .data_out(dout_a), .tsv_defect(def_a),
    .ret_defect(rdef_a), .busy(busy_a), .done(done_a), .error_die1(err1_a), .error_die2(err2_a),
    .status_die1(st1_a), .status_die2(st2_a), .sel_die1(sel1_a), .sel_die2(sel2_a),
    .faulty_die1(f1_a), .faulty_die2(f2_a), .checks(checks_a), .failures(failures_a), .finished(fin_a));

  // ---- 240:3 ----
  localparam int unsigned MB = 240, NB = 3, TB = MB + NB, KB = sel_width(NB), AWB = cnt_width(TB);
  logic                  rst_n_b, start_b, busy_b, done_b, err1_b, err2_b;
  logic [MB-1:0]         din_b, dout_b;
  tsv_defect_e           def_b [TB];
  tsv_defect_e           rdef_b [2];
  logic [TB-1:0]         st1_b, st2_b;
  logic [MB-1:0][KB-1:0] sel1_b, sel2_b;
  logic [AWB-1:0]        f1_b, f2_b;
  int                    checks_b, failures_b;
  bit                    fin_b;

  tsv_ft_top #(.M(MB), .N(NB)) dut_b (
    .clk, .rst_n(rst_n_b), .ft_start(start_b), .data_in(din_b), .data_out(dout_b), .tsv_defect(def_b),
    .ret_defect(rdef_b), .busy(busy_b), .done(done_b), .error_die1(err1_b), .error_die2(err2_b),
    .status_die1(st1_b), .status_die2(st2_b), .sel_die1(sel1_b), .sel_die2(sel2_b),
    .faulty_die1(f1_b), .faulty_die2(f2_b));
  tsv_group_driver #(.M(MB), .N(NB), .RUNS(24), .NAME("ratio")) drv_b (
    .clk, .rst_n(rst_n_b), .ft_start(start_b), .data_in(din_b), .data_out(dout_b), .tsv_defect(def_b),
    .ret_defect(rdef_b), .busy(busy_b), .done(done_b), .error_die1(err1_b), .error_die2(err2_b),
    .status_die1(st1_b), .status_die2(st2_b), .sel_die1(sel1_b), .sel_die2(sel2_b),
    .faulty_die1(f1_b), .faulty_die2(f2_b), .checks(checks_b), .failures(failures_b), .finished(fin_b));

  // ---- 40:1 ----
  localparam int unsigned MC = 40, NC = 1, TC = MC + NC, KC = sel_width(NC), AWC = cnt_width(TC);
  logic                  rst_n_c, start_c, busy_c, done_c, err1_c, err2_c;
  logic [MC-1:0]         din_c, dout_c;
  tsv_defect_e           def_c [TC];
  tsv_defect_e           rdef_c [2];
  logic [TC-1:0]         st1_c, st2_c;
  logic [MC-1:0][KC-1:0] sel1_c, sel2_c;
  logic [AWC-1:0]        f1_c, f2_c;
  int                    checks_c, failures_c;
  bit                    fin_c;

  tsv_ft_top #(.M(MC), .N(NC)) dut_c (
    .clk, .rst_n(rst_n_c), .ft_start(start_c), .data_in(din_c), .data_out(dout_c), .tsv_defect(def_c),
    .ret_defect(rdef_c), .busy(busy_c), .done(done_c), .error_die1(err1_c), .error_die2(err2_c),
    .status_die1(st1_c), .status_die2(st2_c), .sel_die1(sel1_c), .sel_die2(sel2_c),
    .faulty_die1(f1_c), .faulty_die2(f2_c));
  tsv_group_driver #(.M(MC), .N(NC), .RUNS(24), .NAME("ratio")) drv_c (
    .clk, .rst_n(rst_n_c), .ft_start(start_c), .data_in(din_c), .data_out(dout_c), .tsv_defect(def_c),
    .ret_defect(rdef_c), .busy(busy_c), .done(done_c), .error_die1(err1_c), .error_die2(err2_c),
    .status_die1(st1_c), .status_die2(st2_c), .sel_die1(sel1_c), .sel_die2(sel2_c),
    .faulty_die1(f1_c), .faulty_die2(f2_c), .checks(checks_c), .failures(failures_c), .finished(fin_c));

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c, failures_a + failures_b + failures_c + 1);
    $finish;
  end

  initial begin
    wait (fin_a && fin_b && fin_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c, failures_a + failures_b + failures_c);
    $finish;
  end
endmodule
