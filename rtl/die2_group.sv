// Die-2 (receiving) side of one TSV group with grouping ratio M:N.
//
// Normal operation: the routing multiplexers pick the M signal lines off the
// M+N TSVs, as chosen by the latch chain.
// During a run (see ft_sequencer) the NAND test observation judges the TSV
// under test at the end of each test clock and its result is written into
// this die's status register at that edge; in the next clock the same result
// is sent back to die 1 (ret_tx, over the double TSV).  In the INIT clock
// SI = 0 makes every NAND output 1, so the register starts all-faulty.  The
// recovery control then walks the status bits exactly as on die 1 and
// rewrites the multiplexer selects.  busy, done and error behave as on die 1.
// Capturing the NAND output directly into the status bit, and returning one
// serial result per clock, are this design's choices.
module die2_group
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned T  = M + N,
  localparam int unsigned IW = idx_width(T),
  localparam int unsigned K  = sel_width(N),
  localparam int unsigned AW = cnt_width(T)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [T-1:0]        tsv_rx,
  output logic                ret_tx,
  output logic [M-1:0]        data_out,
  output logic                busy,
  output logic                done,
  output logic                error,
  output logic [T-1:0]        status,
  output logic [M-1:0][K-1:0] sel,
  output logic [AW-1:0]       faulty_count
);

  ft_phase_e     phase;
  logic [IW-1:0] idx, cap_idx;
  logic          cap_valid, si, ret_bit, rec_error;
  logic [T-1:0]  test_result, st_en;

  ft_sequencer #(.M(M), .N(N)) u_seq (
    .clk, .rst_n, .start, .phase, .idx, .cap_valid, .cap_idx, .si, .busy, .done
  );

  test_observation #(.M(M), .N(N)) u_obs (
    .tsv_rx, .si, .status, .ret_idx (cap_idx), .test_result, .ret_bit
  );

  assign ret_tx = cap_valid && ret_bit;

  always_comb begin
    st_en = '0;
    for (int j = 0; j < T; j++)
      st_en[j] = (phase == PH_INIT) || ((phase == PH_TEST) && (idx == IW'(j)));
  end

  tsv_status_reg #(.M(M), .N(N)) u_status (
    .clk, .rst_n, .load_en (st_en), .d (test_result), .q (status)
  );

  recovery_block #(.M(M), .N(N)) u_rec (
    .clk, .rst_n,
    .clear        (phase == PH_DRAIN),
    .step         (phase == PH_REPAIR),
    .idx,
    .status,
    .sel,
    .faulty_count (faulty_count),
    .lines_done   (),
    .error        (rec_error)
  );

  routing_mux #(.M(M), .N(N)) u_mux (
    .tsv_rx, .sel, .data_out
  );

  assign error = rec_error && !busy;

endmodule
