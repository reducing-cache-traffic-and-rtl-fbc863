// tb_util_pkg: reference models shared by the testbenches.
//
// init_word   contents of memory before any store (a hash of the block
//             address), used by the cache model and the reference memory.
// load_value  the value a load must return, worked out byte by byte.
// LsqRef      cycle-level model of the LSQ tag state: which entries are
//             valid/present and which the partial-match search hits.
// MvrtRef     model of the memory value reuse table's classification.
package tb_util_pkg;
  import mdl_pkg::*;

  function automatic macro_t init_word(input logic [31:0] blk);
    logic [63:0] x;
    x = {blk, ~blk} * 64'h9E37_79B9_7F4A_7C15;
    return x ^ (x >> 29);
  endfunction

  // Value of a load of size sz at byte offset ofs, from the 8-byte word w.
  function automatic macro_t load_value(input macro_t w, input int ofs,
                                        input mem_size_e sz, input bit sgn);
    int n;
    macro_t r;
    n = 1 << int'(sz);
    r = '0;
    for (int b = 0; b < n; b++) r[8*b +: 8] = w[8*(ofs+b) +: 8];
    if (sgn && r[8*n-1]) for (int b = n; b < 8; b++) r[8*b +: 8] = 8'hFF;
    return r;
  endfunction

  function automatic logic [7:0] mask_of(input int ofs, input mem_size_e sz);
    logic [7:0] m;
    m = '0;
    for (int b = 0; b < (1 << int'(sz)); b++) m[ofs+b] = 1'b1;
    return m;
  endfunction

  class LsqRef;
    int   n;
    bit   v[], p[], sl[];
    int   blk[];
    logic [7:0] mask[];
    int   head;
    int   invalidations;
    int   wraps;

    function new(int entries);
      n = entries;
      v = new[n]; p = new[n]; sl = new[n]; blk = new[n]; mask = new[n];
      foreach (v[i]) begin v[i] = 0; p[i] = 0; sl[i] = 0; blk[i] = 0; mask[i] = 0; end
      head = 0; invalidations = 0; wraps = 0;
    endfunction

    // Partial-match search; returns index or -1.
    function int search(int b, logic [7:0] need);
      for (int i = 0; i < n; i++)
        if (v[i] && p[i] && blk[i] == b && (need & ~mask[i]) == 0) return i;
      return -1;
    endfunction

    function void fill(int idx);
      if (v[idx]) p[idx] = 1;
    endfunction

    // One accepted instruction; returns the allocated entry.
    function int alloc(bit is_store, int b, logic [7:0] m, int hit);
      int idx;
      if (is_store)
        for (int i = 0; i < n; i++)
          if (v[i] && blk[i] == b && (mask[i] & m) != 0) begin
            v[i] = 0; invalidations++;
          end
      idx = head;
      v[idx] = 1; sl[idx] = is_store; blk[idx] = b;
      p[idx] = is_store || hit >= 0;
      mask[idx] = is_store ? m : (hit >= 0 ? mask[hit] : 8'hFF);
      head = (head + 1) % n;
      if (head == 0) wraps++;
      return idx;
    endfunction
  endclass

  class MvrtRef;
    int   n;
    bit   v[], st[];
    int   blk[];
    logic [7:0] mask[], own[];
    int   head;

    function new(int entries);
      n = entries;
      v = new[n]; st = new[n]; blk = new[n]; mask = new[n]; own = new[n];
      foreach (v[i]) begin v[i] = 0; st[i] = 0; blk[i] = 0; mask[i] = 0; own[i] = 0; end
      head = 0;
    endfunction

    // Returns 0 none, 1 S2L, 2 L2L, 3 ML for a load; records the access.
    function int access(bit is_store, int b, logic [7:0] m, bit macro_en);
      int cls;
      bit s, l, ml;
      s = 0; l = 0; ml = 0; cls = 0;
      if (!is_store) begin
        for (int i = 0; i < n; i++) begin
          if (!v[i] || blk[i] != b) continue;
          if (st[i] && (m & ~mask[i]) == 0) s = 1;
          if (!st[i] && (m & ~own[i]) == 0) l = 1;
          if (!st[i] && (m & ~mask[i]) == 0) ml = 1;
        end
        cls = s ? 1 : l ? 2 : ml ? 3 : 0;
      end else begin
        for (int i = 0; i < n; i++)
          if (v[i] && blk[i] == b && (mask[i] & m) != 0) v[i] = 0;
      end
      v[head] = 1; st[head] = is_store; blk[head] = b; own[head] = m;
      mask[head] = (is_store || !macro_en) ? m : 8'hFF;
      head = (head + 1) % n;
      return cls;
    endfunction
  endclass

endpackage
