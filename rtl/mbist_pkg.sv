// mbist_pkg: types and algorithm tables shared by the MBIST blocks.
//
// A March test is a list of elements. Each element walks every address in one
// direction (up or down) and applies a short list of operations to each word.
// An operation is a read or a write of one data background: all zeros, all
// ones, the address itself (a) or its complement (b).
//
// Two algorithms are held here:
//   March 5n : {<>(wa); ^(ra,wb); v(rb,wa)}            5 operations per word
//   MATS++   : {<>(w0); ^(r0,w1); v(r1,w0,r0)}         6 operations per word
// MATS++ is the textbook algorithm. The operation set of March 5n (wa, ra, wb,
// rb, five per word) follows the algorithm's name; the order of the elements
// is this design's choice, laid out like MATS+ with address backgrounds.
// An element with either order ("<>") is run upwards.
package mbist_pkg;

  // Data background used by a read (expected value) or a write (write data).
  typedef enum logic [1:0] {
    PAT_ZERO  = 2'd0,  // r0 / w0
    PAT_ONE   = 2'd1,  // r1 / w1
    PAT_ADDR  = 2'd2,  // ra / wa
    PAT_NADDR = 2'd3   // rb / wb
  } pattern_e;

  typedef enum logic {
    ALG_MARCH5N = 1'b0,
    ALG_MATSPP  = 1'b1
  } alg_e;

  localparam int unsigned MAX_OPS   = 3;   // operations per element
  localparam int unsigned ELEM_W    = 2;   // width of an element index
  localparam int unsigned OP_W      = 2;   // width of an operation index

  typedef struct packed {
    logic     we;   // 1: write, 0: read
    pattern_e pat;  // data background
  } march_op_t;

  typedef struct packed {
    logic                      down;  // 1: descending address order
    logic [OP_W-1:0]           nops;  // number of operations, 1..MAX_OPS
    march_op_t [MAX_OPS-1:0]   ops;   // ops[0] is applied first
  } march_elem_t;

  localparam march_op_t OP_NONE = '{we: 1'b0, pat: PAT_ZERO};

  function automatic march_op_t op_w(pattern_e p);
    return '{we: 1'b1, pat: p};
  endfunction

  function automatic march_op_t op_r(pattern_e p);
    return '{we: 1'b0, pat: p};
  endfunction

  // Number of elements of an algorithm (both algorithms held here have three).
  function automatic logic [ELEM_W-1:0] num_elems(alg_e alg);
    unique case (alg)
      ALG_MARCH5N: return ELEM_W'(3);
      default:     return ELEM_W'(3);
    endcase
  endfunction

  // Operations per word of an algorithm, for test-length checks.
  function automatic int unsigned ops_per_word(alg_e alg);
    return (alg == ALG_MATSPP) ? 6 : 5;
  endfunction

  // Element 'idx' of an algorithm.
  function automatic march_elem_t get_elem(alg_e alg, logic [ELEM_W-1:0] idx);
    march_elem_t e;
    e = '{down: 1'b0, nops: OP_W'(1), ops: {OP_NONE, OP_NONE, OP_NONE}};
    if (alg == ALG_MARCH5N) begin
      case (idx)
        2'd0:    e = '{down: 1'b0, nops: OP_W'(1),
                       ops: {OP_NONE, OP_NONE, op_w(PAT_ADDR)}};
        2'd1:    e = '{down: 1'b0, nops: OP_W'(2),
                       ops: {OP_NONE, op_w(PAT_NADDR), op_r(PAT_ADDR)}};
        default: e = '{down: 1'b1, nops: OP_W'(2),
                       ops: {OP_NONE, op_w(PAT_ADDR), op_r(PAT_NADDR)}};
      endcase
    end else begin
      case (idx)
        2'd0:    e = '{down: 1'b0, nops: OP_W'(1),
                       ops: {OP_NONE, OP_NONE, op_w(PAT_ZERO)}};
        2'd1:    e = '{down: 1'b0, nops: OP_W'(2),
                       ops: {OP_NONE, op_w(PAT_ONE), op_r(PAT_ZERO)}};
        default: e = '{down: 1'b1, nops: OP_W'(3),
                       ops: {op_r(PAT_ZERO), op_w(PAT_ZERO), op_r(PAT_ONE)}};
      endcase
    end
    return e;
  endfunction

endpackage
