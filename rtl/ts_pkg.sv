// Shared types and constants of the turbo-synchronising receiver.
//
// Number formats used between the blocks:
//   * received and corrected symbols: complex, SYM_W-bit signed I and Q;
//   * channel LLRs written by Pre and read by the MAP decoder: LLR_W = 6 bit
//     signed (the 6-bit input quantization of the decoder);
//   * APP LLRs written by the MAP decoder and read by Post: APP_W-bit signed;
//   * phases: PH_W-bit unsigned, full scale = one turn (2*pi);
//   * frequencies: FREQ_W-bit signed phase increment per symbol, full scale
//     = one turn per symbol, so the PH_W most significant bits of a phase
//     accumulator fed by it are a phase word.
// The widths other than LLR_W are this design's choice.
package ts_pkg;

  localparam int SYM_W  = 8;   // received sample I/Q width
  localparam int LLR_W  = 6;   // channel LLR width (decoder input quantization)
  localparam int EXT_W  = 8;   // extrinsic LLR width
  localparam int APP_W  = 8;   // APP LLR width stored in LLR-Out RAM
  localparam int PH_W   = 16;  // phase word width (one turn = 2**PH_W)
  localparam int FREQ_W = 24;  // frequency word width (one turn/symbol = 2**FREQ_W)
  localparam int SE_W   = 8;   // soft symbol estimate width, +1.0 = 127
  localparam int NSTATE = 16;  // trellis states of the component code
  localparam int MET_W  = 16;  // state metric width

  // Complex received / corrected sample.
  typedef struct packed {
    logic signed [SYM_W-1:0] re;
    logic signed [SYM_W-1:0] im;
  } cplx_t;

  // Component code: recursive systematic convolutional code with 16 states,
  // feedback 1+D^3+D^4 (octal 23) and feed-forward 1+D+D^3+D^4 (octal 33).
  // State index = {s1,s2,s3,s4}, s1 = newest register bit (MSB).
  function automatic logic [3:0] rsc_next(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[3], s[2], s[1]};
  endfunction

  function automatic logic rsc_parity(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[3] ^ s[1] ^ s[0];
  endfunction

  // Unique words: the content is not published. Both UWs (start UW first,
  // then end UW) are taken as one QPSK sequence from a maximal-length LFSR
  // (x^7+x^6+1, seed UW_SEED), two LFSR bits per symbol (I bit, then Q bit),
  // bit 0 -> +1. Pre, Post and the testbenches step it symbol by symbol.
  localparam logic [6:0] UW_SEED = 7'h5A;

  function automatic logic [6:0] uw_step(input logic [6:0] r);
    return {r[5:0], r[6] ^ r[5]};
  endfunction

  // {I bit, Q bit} of the symbol at LFSR state r.
  function automatic logic [1:0] uw_sym(input logic [6:0] r);
    logic [6:0] n;
    n = uw_step(r);
    return {r[0], n[0]};
  endfunction

  // LFSR state of the next symbol.
  function automatic logic [6:0] uw_next(input logic [6:0] r);
    return uw_step(uw_step(r));
  endfunction

endpackage
