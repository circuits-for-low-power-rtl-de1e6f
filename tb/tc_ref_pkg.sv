// tc_ref_pkg: reference model of one end's cache, used by the testbenches.
//
// The model keeps ENTRIES words, a valid flag per word and the number of the
// entry written next. A lookup scans the valid entries for the word; a write
// stores the word at the next entry and advances that number modulo ENTRIES.
// W is the word width. It is written independently of the RTL (plain arrays and an integer
// pointer instead of CAM cells and a one-hot ring).
package tc_ref_pkg;
  class cache_model #(int unsigned W = 32);
    int unsigned     n;
    logic [W-1:0]     word [];
    bit              valid [];
    int unsigned     next;

    function new(int unsigned entries);
      n     = entries;
      word  = new[entries];
      valid = new[entries];
      clear();
    endfunction

    function void clear();
      foreach (valid[i]) begin
        valid[i] = 1'b0;
        word[i]  = '0;
      end
      next = 0;
    endfunction

    // Returns 1 and the entry number if `w` is cached.
    function bit lookup(logic [W-1:0] w, output int unsigned idx);
      idx = 0;
      for (int unsigned i = 0; i < n; i++) begin
        if (valid[i] && word[i] == w) begin
          idx = i;
          return 1'b1;
        end
      end
      return 1'b0;
    endfunction

    function void write(logic [W-1:0] w);
      word[next]  = w;
      valid[next] = 1'b1;
      next = (next + 1) % n;
    endfunction

    // Full cycle of one end: look up, and on a miss write. Returns hit.
    function bit step(logic [W-1:0] w, output int unsigned idx);
      bit h;
      h = lookup(w, idx);
      if (!h) write(w);
      return h;
    endfunction
  endclass
endpackage
