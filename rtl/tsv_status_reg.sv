// TSV status register: one bit per TSV of the group, '0' fault-free and '1'
// faulty.  Each bit loads d[j] at the clock edge when load_en[j] is high, so
// results can be written one TSV at a time (serial test) or all at once
// (initialisation).  Reset clears every bit, i.e. all TSVs are taken as good
// and the routing starts as signal i on TSV i; that reset value is this
// design's choice, the 0/1 coding is the scheme's.  One copy sits on each die.
module tsv_status_reg
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M = 4,
  parameter  int unsigned N = 2,
  localparam int unsigned T = M + N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [T-1:0] load_en,
  input  logic [T-1:0] d,
  output logic [T-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= (load_en & d) | (~load_en & q);
  end

endmodule
