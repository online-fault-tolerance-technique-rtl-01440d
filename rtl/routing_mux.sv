// Routing block, die 2 side: M (N+1)-to-1 multiplexers.  Signal line i reads
// TSV i + sel[i] (sel[i] in 0..N); a select code above N reads 0.  The
// selects come from the die-2 latch chain, which holds the same values as the
// die-1 one.  The (N+1)-to-1 multiplexer per line is the scheme's; the value
// read for an unused code is this design's choice.  Combinational.
module routing_mux
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned T = M + N,
  localparam int unsigned K = sel_width(N)
) (
  input  logic [T-1:0]        tsv_rx,
  input  logic [M-1:0][K-1:0] sel,
  output logic [M-1:0]        data_out
);

  always_comb begin
    data_out = '0;
    for (int i = 0; i < M; i++)
      for (int s = 0; s <= N; s++)
        if (sel[i] == K'(s)) data_out[i] = tsv_rx[i + s];
  end

endmodule
