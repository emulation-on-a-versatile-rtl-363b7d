// Reference model for the testbenches: a finite-capacity FIFO of cells at
// slot level, written without any of the RTL's pointers or phases.
package qnet_ref_pkg;
  import qnet_pkg::*;

  class RefQueue;
    cell_t q[$];
    int    cap;

    function new(int cap_i);
      cap = cap_i;
    endfunction

    // Store an arriving cell; returns 1 if it is lost.
    function bit arrive(cell_t c);
      if (!c.valid) return 1'b0;
      if (q.size() >= cap) return 1'b1;
      q.push_back(c);
      return 1'b0;
    endfunction

    // Serve the head cell, or return an empty cell.
    function cell_t depart(bit serve);
      if (!serve || q.size() == 0) return NO_CELL;
      return q.pop_front();
    endfunction
  endclass

  function automatic bit same_cell(cell_t a, cell_t b);
    if (!a.valid && !b.valid) return 1'b1;
    return a == b;
  endfunction

  function automatic cell_t rand_cell(int load_pct, bit [1:0] src);
    cell_t c;
    c.valid = ($urandom_range(0, 99) < load_pct);
    c.probe = 1'($urandom_range(0, 1));
    c.src   = src;
    c.dst   = 2'($urandom_range(0, 3));
    return c;
  endfunction
endpackage
