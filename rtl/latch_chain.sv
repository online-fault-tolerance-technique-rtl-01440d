// Latch chain: the k-bit routing select of each of the M signal lines,
// k = ceil(log2(N+1)).  Line i takes d when its renew enable en[i] is high.
// The selects drive the demultiplexers (die 1) or multiplexers (die 2) of the
// routing block and hold their value during normal operation.  Built from
// enabled flip-flops on the system clock instead of level-sensitive latches
// (the cost model counts them as flip-flops too); reset gives select 0,
// signal i on TSV i.
module latch_chain
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned K = sel_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [M-1:0]        en,
  input  logic [K-1:0]        d,
  output logic [M-1:0][K-1:0] sel
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else
      for (int i = 0; i < M; i++)
        if (en[i]) sel[i] <= d;
  end

endmodule
