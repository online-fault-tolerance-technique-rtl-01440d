// Faulty TSV accumulator of the recovery control: an adder that adds the
// status bit of the TSV walked in this clock (en high) to the running count.
// The count is the number of faulty TSVs met so far, which is also the
// routing select code of the next signal line.  clear restarts it; the width
// holds every TSV of the group being faulty (a choice of this design).
module faulty_tsv_accumulator
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned AW = cnt_width(M + N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  input  logic          faulty,
  output logic [AW-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + AW'(faulty);
  end

endmodule
