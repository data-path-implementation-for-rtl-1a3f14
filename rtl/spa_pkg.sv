// spa_pkg: shared types and constants of the spatially programmable data path.
//
// The fabric is built from programmable elements (PEs) and switches. Every PE
// is generated with a list of functions it supports; the list is a bit mask
// over the global operation encoding below (bit k set = operation k present).
// The PE's runtime configuration register holds an index into that list, so
// its width follows from the number of functions present, as the generator
// described for this architecture derives it. The operation names are those
// used for PE functions (mult, absDiff, gt, lt, sum, sub, inv, nop, rshift,
// max, min); their numeric encoding, signed arithmetic and the exact meaning
// of inv (two's-complement negation) and rshift (arithmetic shift of x by the
// low bits of y) are choices of this implementation.
package spa_pkg;

  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,   // z = x (forward, used to balance pipeline stages)
    OP_SUM     = 4'd1,   // z = x + y
    OP_SUB     = 4'd2,   // z = x - y
    OP_MULT    = 4'd3,   // z = x * y (full-width product)
    OP_ABSDIFF = 4'd4,   // z = |x - y|
    OP_GT      = 4'd5,   // z = (x > y)
    OP_LT      = 4'd6,   // z = (x < y)
    OP_MAX     = 4'd7,   // z = max(x, y)
    OP_MIN     = 4'd8,   // z = min(x, y)
    OP_RSHIFT  = 4'd9,   // z = x >>> y
    OP_INV     = 4'd10   // z = -x
  } op_e;

  localparam int unsigned NUM_OPS = 11;

  typedef logic [NUM_OPS-1:0] func_mask_t;

  // Function lists used by default.
  // Map PE of the PE block diagram: mult, absDiff, gt, lt.
  localparam func_mask_t FUNCS_MAP = func_mask_t'((1 << OP_MULT) | (1 << OP_ABSDIFF) |
                                                  (1 << OP_GT) | (1 << OP_LT));
  // Every operation (generic wave-pipeline PE).
  localparam func_mask_t FUNCS_ALL = '1;

  // Number of functions in a list.
  function automatic int unsigned func_count(func_mask_t m);
    int unsigned n = 0;
    for (int unsigned k = 0; k < NUM_OPS; k++) n += int'(m[k]);
    return n;
  endfunction

  // Width of a binary index into a list of n entries (at least 1 bit).
  function automatic int unsigned idx_width(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Operation at position idx of a function list; OP_NOP if idx is past the end.
  function automatic op_e func_at(func_mask_t m, int unsigned idx);
    int unsigned seen = 0;
    op_e r = OP_NOP;
    for (int unsigned k = 0; k < NUM_OPS; k++) begin
      if (m[k]) begin
        if (seen == idx) r = op_e'(k);
        seen++;
      end
    end
    return r;
  endfunction

  // Position of an operation in a function list (for writing configurations).
  function automatic int unsigned func_index(func_mask_t m, op_e op);
    int unsigned seen = 0;
    int unsigned r = 0;
    for (int unsigned k = 0; k < NUM_OPS; k++) begin
      if (m[k]) begin
        if (k == int'(op)) r = seen;
        seen++;
      end
    end
    return r;
  endfunction

  // Operations that use only the x operand.
  function automatic logic is_unary(op_e op);
    return (op == OP_NOP) || (op == OP_INV);
  endfunction

endpackage
