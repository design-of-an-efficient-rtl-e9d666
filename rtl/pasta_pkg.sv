// pasta_pkg: constants shared by the PASTA adder and the units built on
// it. An n-bit PASTA needs at most n+1 iterations (n when there is no
// carry-in), so its iteration counter needs clog2(n+2) bits.
package pasta_pkg;
  // Width of the iteration count of an n-bit PASTA adder.
  function automatic int unsigned iter_width(int unsigned n);
    return $clog2(n + 2);
  endfunction
endpackage
