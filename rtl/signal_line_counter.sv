// Signal line counter of the recovery control.
//
// Counts the signal lines that have already been given a TSV.  line_en is the
// one-hot "latch renew" enable of the line being configured now: line
// count(i) is enabled when inc is high and fewer than M lines are done; the
// counter then advances at the clock edge.  full is high once all M lines are
// configured (later fault-free TSVs are spares and are not used).  clear
// restarts it before a repair walk.  The scheme names the counter and its M
// renew enables; the binary counter plus decoder is this design's choice.
module signal_line_counter
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  localparam int unsigned CW = cnt_width(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc,
  output logic [CW-1:0] count,
  output logic [M-1:0]  line_en,
  output logic          full
);

  assign full = (count == CW'(M));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (clear)         count <= '0;
    else if (inc && !full)  count <= count + 1'b1;
  end

  always_comb begin
    line_en = '0;
    for (int i = 0; i < M; i++)
      line_en[i] = inc && (count == CW'(i));
  end

endmodule
