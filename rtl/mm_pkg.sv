// Shared types and helpers for the two systolic Montgomery multipliers.
//
// Both arrays move one iteration of radix-2 Montgomery multiplication
// (R_i = (R_{i-1} + a_i*B + q_i*N) / 2) through a row of cells, one cell per
// clock.  The multiplier bit a_i travels together with a small tag that tells
// each cell whether the slot it is working on holds a real iteration (valid),
// whether it is iteration 0 (first: R_{-1} is taken as zero), whether it is
// the last iteration (last: the result bits are final) and which of the two
// operand slots it belongs to.  The tag is this design's own addition: the
// cell equations come from the architecture, the tag is the control that
// lets the arrays start, stop and hold two jobs at once.
package mm_pkg;

  // Default operand width: the 1024-bit RSA case that all evaluations use.
  localparam int unsigned M_DEFAULT = 1024;

  typedef struct packed {
    logic valid;  // this slot carries an iteration
    logic first;  // iteration 0: R_{i-1} is zero
    logic last;   // iteration M-1: R_i is the result
    logic slot;   // operand set (0 or 1) the iteration belongs to
  } tag_t;

  localparam tag_t TAG_IDLE = '{valid: 1'b0, first: 1'b0, last: 1'b0, slot: 1'b0};

  // One-bit full adder, returned as {carry, sum}.
  function automatic logic [1:0] fa(input logic x, input logic y, input logic z);
    return {(x & y) | (x & z) | (y & z), x ^ y ^ z};
  endfunction

  // Quotient-bit precomputation shared by the A-cell and the D-cell:
  // q_i = (R_{i-1})_0 xor a_i*b_0, where (R_{i-1})_0 is rebuilt from the
  // operands of the cell that is producing it in the same cycle.
  function automatic logic q_pre(input logic ab0, input logic r_prev2_1,
                                 input logic p_prev_1, input logic cr_prev_0,
                                 input logic first);
    return ab0 ^ (first ? 1'b0 : (r_prev2_1 ^ p_prev_1 ^ cr_prev_0));
  endfunction

  // Paired full-adder step used by the E- and F-cells: x1,y1 have weight 2,
  // x0,y0 and cin weight 1.  Returns {cout (weight 4), s1, s0, c0}, where c0
  // is the carry from the weight-1 to the weight-2 position.
  function automatic logic [3:0] pair_add(input logic x1, input logic y1,
                                          input logic x0, input logic y0,
                                          input logic cin);
    logic [1:0] lo, hi;
    lo = fa(x0, y0, cin);
    hi = fa(x1, y1, lo[1]);
    return {hi[1], hi[0], lo[0], lo[1]};
  endfunction

endpackage
