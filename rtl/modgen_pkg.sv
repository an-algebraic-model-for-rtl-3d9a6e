// modgen_pkg: types and functions shared by the adder and shifter families.
//
// gp_t is a (generate, propagate) tuple. gp_op() is the associative
// combining operator "o" of the carry monoid:
//   (g, p) o (g', p') = (g | (p & g'), p & p')
// where the left operand is the more significant part. GP_IDENTITY (0, 1)
// is the identity element of the monoid.
//
// shifter_kind_e names the three shifter structures (linear ring, barrel,
// square array). Cyclic shifts in this design follow the permutation
// (1 2 ... n): the bit at index i moves to index (i + c) mod n, which for a
// bit vector with index 0 as LSB is a rotate toward the MSB.
package modgen_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  localparam gp_t GP_IDENTITY = '{g: 1'b0, p: 1'b1};

  function automatic gp_t gp_op(input gp_t hi, input gp_t lo);
    gp_op.g = hi.g | (hi.p & lo.g);
    gp_op.p = hi.p & lo.p;
  endfunction

  typedef enum logic [1:0] {
    SHIFT_LINEAR = 2'd0,
    SHIFT_BARREL = 2'd1,
    SHIFT_SQUARE = 2'd2
  } shifter_kind_e;

endpackage
