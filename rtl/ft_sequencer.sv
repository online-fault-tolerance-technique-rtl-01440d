// Phase sequencer of one die of a TSV group (grouping ratio M:N, T = M+N TSVs).
//
// A one-clock start pulse in PH_IDLE begins a run:
//   PH_INIT   1 clock : si = 0, every status bit is set to "faulty"
//   PH_TEST   T clocks: idx = 0..T-1, TSV idx carries the rising transition;
//                       its result is captured at the end of the clock
//   PH_DRAIN  1 clock : the die-1 copy of result T-1 arrives
//   PH_REPAIR T clocks: idx = 0..T-1, status bit idx is walked by the recovery
//                       control
// then back to PH_IDLE with a one-clock done pulse.  A run therefore takes
// 2(M+N)+2 clocks from the start edge to done: the serial test and the serial
// repair of M+N clocks each, plus the initialisation clock and the clock the
// result needs to cross back over the return TSV.  cap_valid/cap_idx name the
// TSV tested in the previous clock (the one whose result crosses back now).
// start is ignored while busy.  Both dies run one copy each from the same
// clock and start, so they stay in step without further handshaking.
module ft_sequencer
  import tsv_ft_pkg::*;
#(
  parameter  int unsigned M  = 4,
  parameter  int unsigned N  = 2,
  localparam int unsigned T  = M + N,
  localparam int unsigned IW = idx_width(T)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output ft_phase_e     phase,
  output logic [IW-1:0] idx,
  output logic          cap_valid,
  output logic [IW-1:0] cap_idx,
  output logic          si,
  output logic          busy,
  output logic          done
);

  logic last;
  assign last = (idx == IW'(T - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      idx       <= '0;
      cap_valid <= 1'b0;
      cap_idx   <= '0;
      done      <= 1'b0;
    end else begin
      cap_valid <= (phase == PH_TEST);
      cap_idx   <= idx;
      done      <= 1'b0;
      unique case (phase)
        PH_IDLE:   if (start) phase <= PH_INIT;
        PH_INIT:   begin phase <= PH_TEST; idx <= '0; end
        PH_TEST:   if (last) begin phase <= PH_DRAIN; idx <= '0; end
                   else idx <= idx + 1'b1;
        PH_DRAIN:  phase <= PH_REPAIR;
        PH_REPAIR: if (last) begin phase <= PH_IDLE; idx <= '0; done <= 1'b1; end
                   else idx <= idx + 1'b1;
        default:   phase <= PH_IDLE;
      endcase
    end
  end

  assign si   = (phase == PH_TEST);
  assign busy = (phase != PH_IDLE);

endmodule
