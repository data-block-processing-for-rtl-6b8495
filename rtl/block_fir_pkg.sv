// Shared types for the block-processing FIR datapath.
//
// The datapath is a single-multiplier DSP core that evaluates a direct-form
// FIR filter L outputs at a time. This package holds the control-state
// encoding of the block controller and a helper that gives the width of a
// counter able to hold the value n.
package block_fir_pkg;

  // Phases of one output block (see block_controller).
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // wait for L new samples, clear the accumulators
    ST_PRELOAD = 3'd1,  // fetch the first L samples of the block into R_0..R_{L-1}
    ST_MAC     = 3'd2,  // one multiply-accumulate per cycle, N*L cycles
    ST_DRAIN   = 3'd3,  // let the last product reach its accumulator
    ST_OUT     = 3'd4   // hand the L accumulators to the output unit
  } ctrl_state_e;

  // Bits needed to hold the value n (n >= 1).
  function automatic int unsigned cnt_w(input int unsigned n);
    return $clog2(n + 1);
  endfunction

endpackage
