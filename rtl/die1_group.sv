// Die-1 (transmitting) side of one TSV group with grouping ratio M:N.
//
// Normal operation: the M signal lines go through the routing demultiplexers
// onto M of the M+N TSVs, as chosen by the latch chain.
// A start pulse runs detection and recovery (see ft_sequencer): the status
// register is set to all-faulty, the input signal unit walks a rising
// transition over the TSVs one per clock, and each result, judged on die 2,
// comes back one clock later over the double TSV (ret_rx) and is written into
// this die's status register.  The recovery control then walks the status
// bits and rewrites the demultiplexer selects.  Die 2 reaches the same selects
// from its own status copy, so both ends agree without exchanging selects.
// busy is high for the 2(M+N)+2 clocks of a run; done pulses at its end;
// error (more than N faulty TSVs) is shown while idle.  The die-1 status
// register is set to all-faulty directly in INIT (this design's choice).
module die1_group
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
  input  logic [M-1:0]        data_in,
  output logic [T-1:0]        tsv_tx,
  input  logic                ret_rx,
  output logic                busy,
  output logic                done,
  output logic                error,
  output logic [T-1:0]        status,
  output logic [M-1:0][K-1:0] sel,
  output logic [AW-1:0]       faulty_count
);

  ft_phase_e     phase;
  logic [IW-1:0] idx, cap_idx;
  logic          cap_valid, si, rec_error;
  logic [T-1:0]  data_tsv, st_en, st_d;

  ft_sequencer #(.M(M), .N(N)) u_seq (
    .clk, .rst_n, .start, .phase, .idx, .cap_valid, .cap_idx, .si, .busy, .done
  );

  routing_demux #(.M(M), .N(N)) u_demux (
    .data_in, .sel, .tsv_data (data_tsv)
  );

  input_signal_unit #(.M(M), .N(N)) u_isu (
    .clk, .rst_n,
    .test_mode (busy),
    .pat_load  (phase == PH_INIT),
    .pat_shift (si),
    .data_tsv,
    .tsv_tx
  );

  always_comb begin
    if (phase == PH_INIT) begin
      st_en = '1;
      st_d  = '1;
    end else begin
      st_en = '0;
      for (int j = 0; j < T; j++) st_en[j] = cap_valid && (cap_idx == IW'(j));
      st_d  = {T{ret_rx}};
    end
  end

  tsv_status_reg #(.M(M), .N(N)) u_status (
    .clk, .rst_n, .load_en (st_en), .d (st_d), .q (status)
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

  assign error = rec_error && !busy;

endmodule
