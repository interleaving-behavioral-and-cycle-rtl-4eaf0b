// Shared types and helpers for the case-study circuits.
//
// num_sol_e is the 2-bit result of the quadratic-solutions component: the
// number of real roots of a*x^2 + b*x + c, decided from the sign of the
// discriminant. The encoding 0/1/2 is the plain count of roots, as the
// component's output is a 2-bit integer holding that count.
package haydn_pkg;

  typedef enum logic [1:0] {
    NO_ROOTS  = 2'd0,
    ONE_ROOT  = 2'd1,
    TWO_ROOTS = 2'd2
  } num_sol_e;

  // Stage at which a pipelined schedule with initiation interval ii writes
  // a result that is ready after n edges: the next stage boundary, that is
  // the next multiple of ii (a stage lasts ii cycles).
  function automatic int unsigned align_up(int unsigned n, int unsigned ii);
    return ((n + ii - 1) / ii) * ii;
  endfunction

endpackage
