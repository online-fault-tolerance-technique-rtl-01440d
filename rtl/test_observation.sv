// Test observation block of the detection block (die 2).
//
// One NAND gate per TSV: test_result[j] = ~(t2[j] & si).  With si = 1 a TSV
// whose far end has not risen by the capture edge gives 1 (faulty) and a good
// one gives 0; with si = 0 every output is 1, which initialises the status
// registers to "faulty" before a test.  The capture flip-flop is the die-2
// status register bit (tsv_status_reg), loaded by the sequencer.
// ret_bit selects the status bit of the TSV tested in the previous clock and
// sends it to die 1 over the double TSV (one serial return bit per group,
// this design's choice).  Purely combinational.
module test_observation
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned T  = M + N,
  localparam int unsigned IW = idx_width(T)
) (
  input  logic [T-1:0]  tsv_rx,
  input  logic          si,
  input  logic [T-1:0]  status,
  input  logic [IW-1:0] ret_idx,
  output logic [T-1:0]  test_result,
  output logic          ret_bit
);

  assign test_result = ~(tsv_rx & {T{si}});

  always_comb begin
    ret_bit = 1'b0;
    for (int j = 0; j < T; j++)
      if (ret_idx == IW'(j)) ret_bit = status[j];
  end

endmodule
