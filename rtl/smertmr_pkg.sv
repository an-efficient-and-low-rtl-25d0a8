// smertmr_pkg: shared types and helpers of the scan-chain based multiple
// error recovery TMR system (SMERTMR).
//
// Modules are numbered 1, 2 and 3 (I, II, III); the number 0 means "none".
// Faulty-module sets are 3-bit vectors, bit i-1 set when module i is faulty.
// The controller modes follow the description of the technique: normal
// operation, comparison mode, fault location, recovery mode, a check of the
// counters at the end of recovery, the unrecoverable condition, and off-line
// testing through the scan chains. The encoding is this design's own.
package smertmr_pkg;

  typedef logic [1:0] mod_num_t;   // 0 = none, 1..3 = module I..III
  typedef logic [2:0] mod_set_t;   // bit 0 = module I ... bit 2 = module III

  typedef enum logic [2:0] {
    ST_NORMAL  = 3'd0,
    ST_COMPARE = 3'd1,
    ST_LOCATE  = 3'd2,
    ST_RECOVER = 3'd3,
    ST_CHECK   = 3'd4,
    ST_UNREC   = 3'd5,
    ST_OFFLINE = 3'd6
  } ctrl_state_t;

  // Number of modules in a set.
  function automatic logic [1:0] set_count(mod_set_t s);
    return 2'(s[0]) + 2'(s[1]) + 2'(s[2]);
  endfunction

  // Module number of the lowest set bit, 0 when the set is empty.
  function automatic mod_num_t lowest(mod_set_t s);
    if (s[0]) return 2'd1;
    if (s[1]) return 2'd2;
    if (s[2]) return 2'd3;
    return 2'd0;
  endfunction

  // Module number of the highest set bit, 0 when the set is empty.
  function automatic mod_num_t highest(mod_set_t s);
    if (s[2]) return 2'd3;
    if (s[1]) return 2'd2;
    if (s[0]) return 2'd1;
    return 2'd0;
  endfunction

endpackage
