// Behavioural model of one through-silicon via (TSV), terminal t1 on die 1 to
// terminal t2 on die 2.  Not synthesizable logic in the real design: it stands
// for the RC line and its defects, reduced to what the delay test sees at the
// capture clock edge.
//
//   DEF_NONE  : t2 follows t1 within the clock period.
//   DEF_OPEN  : a void or a delaminated landing pad adds series resistance, so
//               a rising edge launched at one clock edge has not crossed the
//               NAND threshold by the next one; modelled as t2 = t1 delayed by
//               one clock.
//   DEF_SHORT : a pinhole to the substrate forms a divider with the driver, so
//               the far end never reaches a logic high; modelled as t2 = 0.
//
// The clock input exists only to express "late by one capture edge".  The
// model assumes every injected defect is larger than the critical resistance
// at the test clock frequency; smaller defects (invisible to the test) are not
// modelled.
module tsv_channel
  import tsv_ft_pkg::*;
(
  input  logic        clk,
  input  tsv_defect_e defect,
  input  logic        t1,
  output logic        t2
);

  logic t1_late;

  always_ff @(posedge clk) t1_late <= t1;

  always_comb begin
    unique case (defect)
      DEF_OPEN:  t2 = t1_late;
      DEF_SHORT: t2 = 1'b0;
      default:   t2 = t1;
    endcase
  end

endmodule
