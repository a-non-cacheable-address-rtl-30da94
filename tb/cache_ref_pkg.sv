// cache_ref_pkg: reference model used by the testbenches to predict what the
// cache returns. It is a plain direct-mapped table of valid bit, tag and block
// per line, kept from the access sequence alone: read misses fill, cacheable
// write hits update in place, cacheable write misses do not allocate, and
// non-cacheable (mirrored) accesses never touch it.
package cache_ref_pkg;

  class cache_ref;
    int unsigned lines;
    bit          valid [];
    int unsigned tag   [];
    logic [31:0] data  [][4];

    function new(int unsigned n_lines);
      lines = n_lines;
      valid = new[n_lines];
      tag   = new[n_lines];
      data  = new[n_lines];
      foreach (valid[i]) valid[i] = 0;
    endfunction

    function int unsigned index(logic [31:0] a);
      return (a >> 4) % lines;
    endfunction

    function int unsigned tag_of(logic [31:0] a);
      return ({1'b0, a[30:0]} >> 4) / lines;
    endfunction

    function bit hit(logic [31:0] a);
      return valid[index(a)] && tag[index(a)] == tag_of(a);
    endfunction

    function logic [31:0] word(logic [31:0] a);
      return data[index(a)][a[3:2]];
    endfunction

    function void fill(logic [31:0] a, logic [31:0] blk [4]);
      valid[index(a)] = 1;
      tag[index(a)]   = tag_of(a);
      for (int w = 0; w < 4; w++) data[index(a)][w] = blk[w];
    endfunction

    function void write_hit(logic [31:0] a, logic [31:0] d, logic [3:0] be);
      for (int b = 0; b < 4; b++)
        if (be[b]) data[index(a)][a[3:2]][8*b +: 8] = d[8*b +: 8];
    endfunction
  endclass

endpackage
