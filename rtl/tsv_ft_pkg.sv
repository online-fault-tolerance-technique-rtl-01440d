// Shared types and helper functions for the online TSV fault-tolerance logic.
//
// A TSV group of grouping ratio M:N carries M signal lines over M+N TSVs.
// Each die runs the same phase sequence (ft_phase_e): initialise the status
// registers, test the M+N TSVs one per clock with a rising transition, wait
// one clock for the die-1 copy of the last result, then walk the M+N status
// bits one per clock to reconfigure the routing.  tsv_defect_e selects the
// behaviour of the TSV model used in simulation.
package tsv_ft_pkg;

  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,  // normal operation with the current routing
    PH_INIT   = 3'd1,  // SI = 0: status registers set to "faulty"
    PH_TEST   = 3'd2,  // one TSV tested per clock
    PH_DRAIN  = 3'd3,  // last result travels back to die 1
    PH_REPAIR = 3'd4   // one status bit walked per clock
  } ft_phase_e;

  typedef enum logic [1:0] {
    DEF_NONE  = 2'd0,  // fault-free TSV
    DEF_OPEN  = 2'd1,  // void or delamination: resistive open, slow edge
    DEF_SHORT = 2'd2   // short to substrate: degraded high level
  } tsv_defect_e;

  // Bits of the index of one of t items (at least 1).
  function automatic int unsigned idx_width(int unsigned t);
    return (t <= 1) ? 1 : $clog2(t);
  endfunction

  // Bits of a count 0..t (at least 1).
  function automatic int unsigned cnt_width(int unsigned t);
    return (t < 1) ? 1 : $clog2(t + 1);
  endfunction

  // Select width k = ceil(log2(n+1)) of a 1-to-(n+1) demultiplexer (at least 1).
  function automatic int unsigned sel_width(int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

endpackage
