// Tolerance comparator: error is high when the number of faulty TSVs in the
// group exceeds its tolerance limit N (the number of redundant TSVs), i.e.
// when fewer than M fault-free TSVs are left for the M signal lines.
// Combinational.  The scheme has one comparator per group; this design
// places one in the recovery control of each die.
module tolerance_comparator
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned AW = cnt_width(M + N)
) (
  input  logic [AW-1:0] count,
  output logic          error
);

  assign error = (count > AW'(N));

endmodule
