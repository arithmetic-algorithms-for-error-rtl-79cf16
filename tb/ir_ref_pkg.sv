// ir_ref_pkg: reference functions for the inverse-residue testbenches.
package ir_ref_pkg;
  // inverse residue X'' = 15 - (X mod 15) of an unsigned bit pattern
  function automatic logic [3:0] inv_res(longint unsigned v);
    return 4'(15 - (v % 15));
  endfunction
endpackage
