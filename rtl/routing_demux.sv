// Routing block, die 1 side: M 1-to-(N+1) demultiplexers.  Signal line i is
// connected to TSV i + sel[i] (sel[i] in 0..N); a TSV that no line selects is
// driven 0 (a choice of this design; the scheme only fixes the 1-to-(N+1)
// demultiplexer per line).  The selects come from the latch chain of the
// recovery control.  Combinational.
module routing_demux
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned T = M + N,
  localparam int unsigned K = sel_width(N)
) (
  input  logic [M-1:0]        data_in,
  input  logic [M-1:0][K-1:0] sel,
  output logic [T-1:0]        tsv_data
);

  always_comb begin
    tsv_data = '0;
    for (int i = 0; i < M; i++)
      for (int s = 0; s <= N; s++)
        if (sel[i] == K'(s)) tsv_data[i + s] = tsv_data[i + s] | data_in[i];
  end

endmodule
