// One TSV group with online fault tolerance, both dies and the vias between
// them (grouping ratio M:N, default 4:2: four signal lines, six TSVs, up to
// two defective TSVs repaired).
//
//   die1_group --tsv_tx[M+N]--> M+N tsv_channel --tsv_rx--> die2_group
//   die1_group <----ret------- double_tsv <-------ret_tx--- die2_group
//
// ft_start (one clock, shared by both dies) runs detection and recovery:
// each TSV gets a rising-transition delay test (one per clock), the results
// are kept in a status register on each die, and both dies then reroute the
// signal lines around the faulty TSVs.  busy is high for 2(M+N)+2 clocks,
// during which data does not pass; afterwards data_out follows data_in
// combinationally through the healthy TSVs.  error_die1/2 report more than N
// faulty TSVs; faulty_die1/2 count them.  tsv_defect and ret_defect drive the behavioural via models
// and exist for simulation only.  The split into two dies, the double return
// via and the both-die recovery follow the scheme; the shared start pulse and
// the cycle-level via models are this design's choices.
module tsv_ft_top
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned T = M + N,
  localparam int unsigned K = sel_width(N),
  localparam int unsigned AW = cnt_width(T)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ft_start,
  input  logic [M-1:0]        data_in,
  output logic [M-1:0]        data_out,
  input  tsv_defect_e         tsv_defect [T],
  input  tsv_defect_e         ret_defect [2],
  output logic                busy,
  output logic                done,
  output logic                error_die1,
  output logic                error_die2,
  output logic [T-1:0]        status_die1,
  output logic [T-1:0]        status_die2,
  output logic [M-1:0][K-1:0] sel_die1,
  output logic [M-1:0][K-1:0] sel_die2,
  output logic [AW-1:0]       faulty_die1,
  output logic [AW-1:0]       faulty_die2
);

  logic [T-1:0] tsv_tx, tsv_rx;
  logic         ret_tx, ret_rx;
  logic         busy2, done2;

  die1_group #(.M(M), .N(N)) u_die1 (
    .clk, .rst_n, .start (ft_start), .data_in, .tsv_tx, .ret_rx,
    .busy, .done, .error (error_die1), .status (status_die1), .sel (sel_die1),
    .faulty_count (faulty_die1)
  );

  for (genvar j = 0; j < T; j++) begin : g_tsv
    tsv_channel u_tsv (.clk, .defect (tsv_defect[j]), .t1 (tsv_tx[j]), .t2 (tsv_rx[j]));
  end

  double_tsv u_ret (.clk, .defect (ret_defect), .tx (ret_tx), .rx (ret_rx));

  die2_group #(.M(M), .N(N)) u_die2 (
    .clk, .rst_n, .start (ft_start), .tsv_rx, .ret_tx, .data_out,
    .busy (busy2), .done (done2), .error (error_die2), .status (status_die2), .sel (sel_die2),
    .faulty_count (faulty_die2)
  );

  // The two sequencers run in lock step from the same clock and start.
  property p_dies_in_step;
    @(posedge clk) disable iff (!rst_n) (busy == busy2) && (done == done2);
  endproperty
  a_dies_in_step: assert property (p_dies_in_step);

endmodule
