// Behavioural model of the double TSV that returns each die-2 test result to
// the die-1 status register.  Two vias are joined at both ends, so the bit
// still arrives when one of them is open or shorted: whenever at least one via
// is healthy its low-resistance path sets the far-end level and rx = tx.
// With both vias defective the joint end is what the better of the two
// delivers: the late copy if one is merely open, 0 if both are shorted.
// Both vias are instances of the tsv_channel model; like it, this is a model
// of a physical structure, not logic.
module double_tsv
  import tsv_ft_pkg::*;
(
  input  logic        clk,
  input  tsv_defect_e defect [2],
  input  logic        tx,
  output logic        rx
);

  logic [1:0] t2;

  for (genvar g = 0; g < 2; g++) begin : g_via
    tsv_channel u_via (.clk(clk), .defect(defect[g]), .t1(tx), .t2(t2[g]));
  end

  always_comb begin
    if (defect[0] == DEF_NONE || defect[1] == DEF_NONE) rx = tx;
    else                                                 rx = |t2;
  end

endmodule
