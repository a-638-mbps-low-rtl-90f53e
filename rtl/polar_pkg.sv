// polar_pkg: constants, types and arithmetic shared by the Fast-SSC polar
// decoder.
//
// The decoder works on a length-N polar code (N = 2**LOG_N = 1024 by default)
// whose decoder tree is described by a short program of instructions held in
// the controller.  Each instruction is one node operation of the Fast-SSC
// algorithm: F, G / G_0R, a leaf-node decoder, or a Combine / Combine_0R.
//
// Number formats follow the 6.5.1 quantization: internal LLRs are QI = 6-bit
// two's complement, channel LLRs QC = 5-bit, with one fractional bit (the
// fractional bit only scales the values; the hardware treats them as
// integers).  Sums are saturated symmetrically to +/-(2**(QI-1)-1) so that a
// negation never overflows (this saturation rule is a choice of this design).
package polar_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned LOG_N   = 10;        // code length N = 1024
  localparam int unsigned N       = 1 << LOG_N;
  localparam int unsigned P       = 256;       // LLR inputs of F/G per cycle
  localparam int unsigned PE      = P / 2;     // F/G lanes (outputs per cycle)
  localparam int unsigned LOG_PE  = $clog2(PE);
  localparam int unsigned QI      = 6;         // internal LLR bits
  localparam int unsigned QC      = 5;         // channel LLR bits
  localparam int unsigned QF      = 1;         // fractional bits (scale only)
  localparam int unsigned LOAD_W  = 32;        // channel LLRs loaded per cycle
  localparam int unsigned OUT_W   = 32;        // codeword bits read per cycle
  localparam int unsigned REP_MAX = 32;        // longest Repetition node
  localparam int unsigned PROG_DEPTH = 1024;   // instruction memory entries

  localparam int unsigned STW = $clog2(LOG_N + 1);   // stage field width

  // Words of PE LLRs in the alpha memory: one word per stage up to LOG_PE,
  // 2**(s-LOG_PE) words for a stage s above it (stage LOG_N is the channel).
  localparam int unsigned ALPHA_WORDS = (1 << (LOG_N - LOG_PE)) - 2 + LOG_PE + 1;
  localparam int unsigned CH_WORDS    = N / PE;   // channel words per frame

  typedef logic signed [QI-1:0] llr_t;
  typedef logic signed [QC-1:0] ch_llr_t;

  // ---------------------------------------------------------- instructions
  typedef enum logic [1:0] {
    OP_F    = 2'd0,   // F on the node at 'stage', result to stage-1
    OP_G    = 2'd1,   // G (or G_0R if left_zero) on node at 'stage'
    OP_LEAF = 2'd2,   // leaf decoder on the node at 'stage' (optionally fed
                      // by G / G_0R of its parent and followed by Combine)
    OP_COMB = 2'd3    // Combine (or Combine_0R) of two stage-'stage' children
  } op_e;

  typedef enum logic [3:0] {
    LF_R0      = 4'd0,  // rate-0: all frozen
    LF_R1      = 4'd1,  // rate-1: hard decisions, up to PE bits
    LF_REP     = 4'd2,  // repetition, up to REP_MAX bits
    LF_SPC     = 4'd3,  // single parity check, up to PE bits
    LF_REPSPC  = 4'd4,  // 0001 0111
    LF_0SPC    = 4'd5,  // 0000 0111
    LF_01      = 4'd6,  // 0011
    LF_001     = 4'd7,  // 0000 0011
    LF_REP1    = 4'd8,  // 0001 1111
    LF_0REPSPC = 4'd9   // 0000 0000 0001 0111
  } leaf_e;

  typedef struct packed {
    op_e              op;
    logic [STW-1:0]   stage;        // log2 of the node length the op works on
    leaf_e            leaf;         // leaf type (OP_LEAF only)
    logic             left_zero;    // left sibling is rate-0 (G_0R, Combine_0R)
    logic             right_child;  // OP_LEAF: node is a right child, combine now
    logic             from_g;       // OP_LEAF: input is G / G_0R of the parent
    logic             res_left;     // produced bit vector is a left child
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // ------------------------------------------------------------ arithmetic
  localparam int LLR_MAX = (1 << (QI - 1)) - 1;

  function automatic llr_t sat(input logic signed [QI+1:0] v);
    if (int'(v) > LLR_MAX)       return llr_t'(LLR_MAX);
    else if (int'(v) < -LLR_MAX) return llr_t'(-LLR_MAX);
    else                   return llr_t'(v);
  endfunction

  function automatic logic [QI-1:0] mag(input llr_t a);
    return a[QI-1] ? QI'(-a) : QI'(a);
  endfunction

  // Eq. (1): min-sum F.
  function automatic llr_t f_op(input llr_t a, input llr_t b);
    logic [QI-1:0] m;
    m = (mag(a) < mag(b)) ? mag(a) : mag(b);
    return (a[QI-1] ^ b[QI-1]) ? llr_t'(-m) : llr_t'(m);
  endfunction

  // Eq. (2): G, with beta the left sibling's bit estimate.
  function automatic llr_t g_op(input llr_t a, input llr_t b, input logic beta);
    logic signed [QI+1:0] s;
    s = beta ? ((QI+2)'(b) - (QI+2)'(a)) : ((QI+2)'(b) + (QI+2)'(a));
    return sat(s);
  endfunction

  // Hard decision: 1 for a negative LLR.
  function automatic logic hard(input llr_t a);
    return a[QI-1];
  endfunction

  // Number of F/G cycles for a node of length 2**s.
  function automatic int unsigned fg_cycles(input int unsigned s);
    return (s > LOG_PE + 1) ? (1 << (s - LOG_PE - 1)) : 1;
  endfunction

  // Alpha memory word holding chunk c of stage s (s < LOG_N).
  function automatic int unsigned alpha_addr(input int unsigned s, input int unsigned c);
    if (s > LOG_PE) return (1 << (s - LOG_PE)) - 2 + c;
    else            return (1 << (LOG_N - LOG_PE)) - 2 + s;
  endfunction

endpackage
