// fir_pkg: shared sizes and types of the multichannel FIR filter.
//
// The filter computes y(n) = sum_{k=0}^{M-1} h(k) x(n-k) for eight
// independent channels with a single shared multiply-accumulate unit.
// The number formats mirror a DSP MAC: 16-bit two's-complement samples and
// coefficients, a 40-bit accumulator (8 guard bits over a 32-bit product)
// and a 32-bit saturated result. The filter has 17 symmetric taps, so only
// 9 coefficients are distinct. All of these numbers come from the filter
// specification; the state encoding of the controller is this design's own.
package fir_pkg;

  localparam int unsigned TAPS     = 17;  // filter length M
  localparam int unsigned CHANNELS = 8;   // multiplexed channels
  localparam int unsigned DATA_W   = 16;  // input sample width
  localparam int unsigned COEF_W   = 16;  // coefficient width
  localparam int unsigned ACC_W    = 40;  // accumulator width
  localparam int unsigned OUT_W    = 32;  // saturated output width
  // Sequential multipliers working side by side: one per distinct
  // coefficient, so all products of a sample are formed at once.
  localparam int unsigned MULTS    = (TAPS + 1) / 2;

  // Distinct coefficients of a symmetric filter: h(k) = h(M-1-k).
  function automatic int unsigned n_unique(input int unsigned taps);
    return (taps + 1) / 2;
  endfunction

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,  // waiting for a sample; data store shifts on accept
    ST_LOAD = 3'd1,  // pre-add the tap pairs of a group, start multipliers
    ST_MUL  = 3'd2,  // multipliers busy
    ST_ACC  = 3'd3,  // add the group's products one per cycle
    ST_OUT  = 3'd4   // present the saturated result for one cycle
  } fir_state_e;

endpackage
