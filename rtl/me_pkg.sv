// me_pkg: types and helper functions shared by the full-search motion
// estimation (ME) engine.
//
// me_mode_e is the "mode" input of the cascadable processor. It selects what
// the adder tree adds from the Error_in port and what leaves on Error_out:
//   MODE_STANDALONE : Error_in is ignored (forced to 0), Error_out = minimum MAD
//   MODE_PARTIAL    : Error_in is added, Error_out = per-candidate partial MAD
//   MODE_LAST       : Error_in is added, Error_out = minimum MAD
// The document draws a single "mode" line that switches both multiplexers;
// splitting it into three settings is this design's choice, so that the last
// processor of a chain can both add Error_in and report the minimum.
package me_pkg;

  typedef enum logic [1:0] {
    MODE_STANDALONE = 2'd0,
    MODE_PARTIAL    = 2'd1,
    MODE_LAST       = 2'd2
  } me_mode_e;

  // Sequencer states: preload of N-1 search rows, execution of (2P)^2
  // candidates, and the N-1 drain cycles that deliver the boundary (RS) part
  // of the last search row.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_INIT  = 2'd1,
    ST_EXEC  = 2'd2,
    ST_DRAIN = 2'd3
  } me_state_e;

  // Width of an unsigned counter that holds 0 .. n-1 (at least 1 bit).
  function automatic int unsigned cnt_w(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
