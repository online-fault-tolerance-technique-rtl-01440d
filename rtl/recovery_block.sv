// Recovery control of one die of a TSV group (grouping ratio M:N).
//
// During the repair walk (step high) it looks at one status bit per clock,
// TSV idx = 0..M+N-1 in order:
//   * fault-free TSV and not all lines configured: the next signal line i
//     (signal line counter) is given this TSV; its latch-chain entry takes the
//     faulty TSV count so far, so line i uses TSV i + sel[i];
//   * faulty TSV: the faulty TSV accumulator adds one.
// Because selects only grow with i, every line i lands within TSVs
// i..i+N as long as at most N TSVs are faulty.  The comparator raises error
// when the count exceeds N; lines_done counts
// the signal lines configured so far.  clear restarts the counter and accumulator (the
// latch chain keeps the previous routing until it is overwritten).  After
// M+N steps sel is valid; error is valid after the last step and holds until
// the next clear.  The four parts are the scheme's; the walk order and the
// use of the accumulator value as the select are this design's reading of how
// they cooperate.
module recovery_block
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned T  = M + N,
  localparam int unsigned IW = idx_width(T),
  localparam int unsigned K  = sel_width(N),
  localparam int unsigned AW = cnt_width(T),
  localparam int unsigned CW = cnt_width(M)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                step,
  input  logic [IW-1:0]       idx,
  input  logic [T-1:0]        status,
  output logic [M-1:0][K-1:0] sel,
  output logic [AW-1:0]       faulty_count,
  output logic [CW-1:0]       lines_done,
  output logic                error
);

  logic          faulty;
  logic [M-1:0]  line_en;
  logic          lines_full;

  always_comb begin
    faulty = 1'b0;
    for (int j = 0; j < T; j++)
      if (idx == IW'(j)) faulty = status[j];
  end

  signal_line_counter #(.M(M)) u_line_cnt (
    .clk, .rst_n, .clear,
    .inc     (step && !faulty && !lines_full),
    .count   (lines_done),
    .line_en (line_en),
    .full    (lines_full)
  );

  faulty_tsv_accumulator #(.M(M), .N(N)) u_acc (
    .clk, .rst_n, .clear,
    .en     (step),
    .faulty (faulty),
    .count  (faulty_count)
  );

  latch_chain #(.M(M), .N(N)) u_latch (
    .clk, .rst_n,
    .en  (line_en),
    .d   (K'(faulty_count)),
    .sel (sel)
  );

  tolerance_comparator #(.M(M), .N(N)) u_cmp (
    .count (faulty_count),
    .error (error)
  );

endmodule
