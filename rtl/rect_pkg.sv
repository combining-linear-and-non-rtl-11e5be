// rect_pkg: constants and types shared by the rectangular decoder.
//
// A rectangle's control word is {width, chain select mask, fill value}, most
// significant field first: W_BITS of width, N_CHAINS/K_SHARE mask bits and one
// fill bit. The defaults describe the main configuration evaluated for the
// decoder: 30 scan chains, one mask bit per k = 2 chains (15 mask bits), a
// 4-bit width field, so a 20-bit word, and a control RAM of 16 words, which
// holds the largest single cluster at 30 chains (320 bits). The width
// threshold (2) and the 16-bit cube length counter are this design's choices.
package rect_pkg;

  localparam int unsigned N_CHAINS_D  = 30;  // scan chains
  localparam int unsigned K_SHARE_D   = 2;   // chains per chain-select-mask bit
  localparam int unsigned W_BITS_D    = 4;   // bits of the rectangle width field
  localparam int unsigned MIN_WIDTH_D = 2;   // narrower rectangles ignore mask/fill
  localparam int unsigned DEPTH_D     = 16;  // control RAM words
  localparam int unsigned LEN_W_D     = 16;  // bits of the cube length (scan slices)

  // Width of a control word for a given configuration.
  function automatic int unsigned word_bits(int unsigned n_chains, int unsigned k_share,
                                            int unsigned w_bits);
    return w_bits + (n_chains + k_share - 1) / k_share + 1;
  endfunction

  // Operations of the RAM address pointer.
  typedef enum logic [2:0] {
    PTR_HOLD    = 3'd0,  // keep both pointers
    PTR_CLEAR   = 3'd1,  // start of session: both pointers to word 0
    PTR_NEXT    = 3'd2,  // read word at ptr, ptr <= ptr + 1
    PTR_RESTART = 3'd3,  // same cluster again: read word at cluster start
    PTR_NEWCL   = 3'd4,  // new preloaded cluster: cluster start <= ptr, read it
    PTR_FIRST   = 3'd5   // incrementally loaded cluster: read word 0
  } ptr_op_e;

  // Controller states.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,  // before the session; preloading of the RAM allowed
    ST_FLAG  = 2'd1,  // extra cycle per cube: new-cluster bit from the decompressor
    ST_LOAD  = 2'd2,  // incremental loading of one cluster's control words
    ST_SHIFT = 2'd3   // scan slices of the cube are decoded and shifted
  } ctrl_state_e;

endpackage
