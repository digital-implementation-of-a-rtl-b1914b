// sc_pkg: constants and helpers shared by the stochastic-computing MLP.
//
// Values are carried as Bernoulli bit streams: an 8-bit value E is encoded
// by comparing it each cycle with an 8-bit random number R (bit = R < E), so
// the fraction of ones in an L-cycle stream is about E/256. Stream length
// L = 255, 8-bit weights, 8-bit LFSRs, 9-bit up/down decoders and the
// 197-64-10 network size come from the design description. The learning rate
// 0.3 is held as an 8-bit stream probability (77/256). The seed rule that
// gives every LFSR its own phase of the 255-state sequence is a choice of
// this implementation.
package sc_pkg;

  localparam int unsigned VAL_W   = 8;    // weights, inputs, targets, random numbers
  localparam int unsigned CNT_W   = 9;    // up/down decoder width
  localparam int unsigned STREAM_L = 255; // bits per stream pass

  localparam int unsigned NX_DEFAULT = 197;
  localparam int unsigned NV_DEFAULT = 64;
  localparam int unsigned NY_DEFAULT = 10;
  localparam int unsigned ETA_DEFAULT = 77; // 0.3 * 256, rounded

  typedef logic [VAL_W-1:0] val_t;
  typedef logic signed [CNT_W-1:0] cnt_t;

  // Which weight memory a host access addresses.
  typedef enum logic {LAYER_HIDDEN = 1'b0, LAYER_OUTPUT = 1'b1} layer_e;

  // Phase of the pass sequencer.
  typedef enum logic [1:0] {ST_IDLE = 2'd0, ST_RUN = 2'd1, ST_FINISH = 2'd2} phase_e;

  // Seed of LFSR number idx: spreads the generators over the 255 non-zero
  // states (97 is coprime with 255, so the first 255 indices all differ).
  function automatic val_t lfsr_seed(input int unsigned idx);
    return val_t'(((idx * 97) % 255) + 1);
  endfunction

  // Fibonacci LFSR step, taps 8,6,5,4 (x^8+x^6+x^5+x^4+1, period 255).
  function automatic val_t lfsr_next(input val_t s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  // Weight value after reset: a small, scattered magnitude (0..31) so that a
  // freshly reset network has non-zero streams to learn from. Hosts
  // normally overwrite it through the write port.
  function automatic val_t weight_init(input int unsigned layer, input int unsigned neg,
                                       input int unsigned row, input int unsigned col);
    return val_t'((row * 29 + col * 13 + neg * 7 + layer * 3 + 5) % 32);
  endfunction

endpackage
