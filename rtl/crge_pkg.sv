// crge_pkg -- shared constants and helpers for the CRGE permutation generators.
//
// CRGE (cyclic rotations of group elements) turns an index given in the
// factorial number system, digits d_1..d_{n-1} with d_i in [0, i], into a
// permutation sigma of {0..n-1}. Element i is found on its own as
//   sigma(i) = f_{n-1}( ... f_{i+1}( f_i(i, d_i), d_{i+1}) ..., d_{n-1})
// with f_i(x, d) = (x - d) mod (i + 1). Every element and every digit is
// held in elem_width(n) bits; that uniform width is a choice of this design.
package crge_pkg;

  // Bits needed to hold any value in [0, n-1]; at least one bit.
  function automatic int unsigned elem_width(input int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
