// st_pkg: shared types for the self-timed iteration circuits.
//
// Every data bit travels on a dual-rail pair (dr_t). Both rails low is the
// reset value ("not yet valid"); exactly one rail high is a valid bit whose
// value is named by the rail (t = 1, f = 0). Both rails high never occurs.
// A word is an array of pairs: it is valid when every pair is valid and reset
// when every pair is reset. This encoding is the one the design is based on;
// the stage-style enumeration and helper functions are conveniences of this
// implementation.
package st_pkg;

  // One dual-rail bit.
  typedef struct packed {
    logic t;   // true rail
    logic f;   // false rail
  } dr_t;

  // Stage circuit used by a ring (see iter_ring).
  typedef enum logic [2:0] {
    ST_DIRECT = 3'd0,   // precondition + latch, fully delay-independent
    ST_CMOS   = 3'd1,   // F and latch merged, status memory on successor
    ST_OPT    = 3'd2,   // reset faster than evaluation, slow-pair completion
    ST_CONC   = 3'd3,   // as ST_OPT with early reset release
    ST_SLOW   = 3'd4    // as ST_CMOS, but reset tests on the slow pair only
  } style_e;

  // Valid value of a binary bit.
  function automatic dr_t dr_enc(input logic v);
    dr_t r;
    r.t = v;
    r.f = ~v;
    return r;
  endfunction

  // Status of one pair: high when valid.
  function automatic logic dr_any(input dr_t d);
    return d.t | d.f;
  endfunction

  // Dual-rail inversion is a rail swap.
  function automatic dr_t dr_not(input dr_t d);
    dr_t r;
    r.t = d.f;
    r.f = d.t;
    return r;
  endfunction

endpackage
