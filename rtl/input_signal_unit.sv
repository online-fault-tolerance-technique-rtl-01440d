// Input signal unit of the detection block (die 1).
//
// Stores the test transition in a one-hot register of M+N flip-flops: pat_load
// puts a 1 on TSV 0 and each pat_shift moves it to the next TSV, so the TSVs
// receive a 0->1 transition one after another, one per clock, while every
// other TSV is held at 0.  After the last TSV the 1 falls off the end and all
// TSVs stay low for the rest of the run.  While test_mode is low the TSVs are
// driven by the routed signal lines (data_tsv) instead.
// The walking one-hot register and the 2:1 select placed after the routing
// demultiplexer are this design's way of "storing transition signals for test
// application".
module input_signal_unit
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned T = M + N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         pat_load,
  input  logic         pat_shift,
  input  logic [T-1:0] data_tsv,
  output logic [T-1:0] tsv_tx
);

  logic [T-1:0] pat_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         pat_q <= '0;
    else if (pat_load)  pat_q <= T'(1);
    else if (pat_shift) pat_q <= pat_q << 1;
  end

  assign tsv_tx = test_mode ? pat_q : data_tsv;

endmodule
