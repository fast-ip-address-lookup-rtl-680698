// trie_model_pkg: reference model for the lookup testbenches.
//
// trie_model holds a list of routing prefixes <value, length, result> for
// addresses of up to 128 bits and does two independent things with it:
//   * lpm(addr): longest-prefix match, by trying every prefix length from
//     the longest down in a table of the prefixes (result 0 when no prefix
//     matches) - the expected answer of a lookup;
//   * build(): the memory images of a k-multibit trie for the engines, by
//     leaf pushing. Logical stage l resolves address bits
//     [W-1-l*k -: k]. An entry of stage l whose (l+1)*k-bit path is the start
//     of some longer prefix becomes a pointer to a new 2^k chunk on logical
//     stage l+1; any other entry holds the result of the longest prefix no
//     longer than (l+1)*k bits that matches the path. Logical stage l lives
//     in the memory of physical stage phys[l]; chunk indices count chunks of
//     2^k entries in that memory and chunk 0 of phys[0] is the root.
// The images are kept as per-physical-stage lists of (address, data) writes.
package trie_model_pkg;

  typedef logic [127:0] addr_t;

  class trie_model;
    int unsigned W, K, M, L, P;
    int unsigned phys[];
    addr_t           pv[$];
    int unsigned     plen[$];
    int unsigned     pres[$];
    // exact[len][top len bits] = result
    int unsigned     exact[int][addr_t];
    // inner[len][path] exists if a longer prefix starts with path
    bit              inner[int][addr_t];
    int unsigned     next_free[];
    int unsigned     wr_addr[][$];
    int unsigned     wr_data[][$];
    int unsigned     max_chunk;

    function new(int unsigned w, int unsigned k, int unsigned m, int unsigned p);
      W = w; K = k; M = m; P = p; L = w / k;
      phys = new[L];
      foreach (phys[i]) phys[i] = i % P;
      next_free = new[P];
      wr_addr = new[P];
      wr_data = new[P];
    endfunction

    function void set_phys(int unsigned l, int unsigned p);
      phys[l] = p;
    endfunction

    function addr_t top(addr_t a, int unsigned len);
      return (len == 0) ? '0 : (a >> (W - len));
    endfunction

    function addr_t mask(int unsigned len);
      addr_t ones = '1;
      if (len == 0) return '0;
      return (ones >> (128 - len)) << (W - len);
    endfunction

    function void add_prefix(addr_t value, int unsigned len, int unsigned res);
      addr_t v = value & mask(len);
      pv.push_back(v);
      plen.push_back(len);
      pres.push_back(res);
      exact[len][top(v, len)] = res;
      for (int unsigned l = 1; l < len; l++) inner[l][top(v, l)] = 1;
    endfunction

    // Longest matching prefix of at most max_len bits.
    function int unsigned lpm_upto(addr_t addr, int unsigned max_len);
      for (int len = max_len; len >= 0; len--)
        if (exact.exists(len) && exact[len].exists(top(addr, len)))
          return exact[len][top(addr, len)];
      return 0;
    endfunction

    function int unsigned lpm(addr_t addr);
      return lpm_upto(addr, W);
    endfunction

    // Is there a prefix longer than len bits that starts with path?
    function bit has_longer(addr_t path, int unsigned len);
      return inner.exists(len) && inner[len].exists(path);
    endfunction

    function void build_node(int unsigned l, int unsigned chunk, addr_t path);
      int unsigned p = phys[l];
      for (int unsigned e = 0; e < (1 << K); e++) begin
        addr_t v = (path << K) | addr_t'(e);
        int unsigned vlen = (l + 1) * K;
        int unsigned a = chunk * (1 << K) + e;
        if (l + 1 < L && has_longer(v, vlen)) begin
          int unsigned np = phys[l + 1];
          int unsigned nc = next_free[np];
          next_free[np]++;
          if (nc > max_chunk) max_chunk = nc;
          wr_addr[p].push_back(a);
          wr_data[p].push_back((1 << M) | nc);
          build_node(l + 1, nc, v);
        end else begin
          wr_addr[p].push_back(a);
          wr_data[p].push_back(lpm_upto(v << (W - vlen), vlen));
        end
      end
    endfunction

    function void build();
      foreach (next_free[i]) next_free[i] = 0;
      foreach (wr_addr[i]) begin wr_addr[i].delete(); wr_data[i].delete(); end
      next_free[phys[0]] = 1;
      max_chunk = 0;
      build_node(0, 0, '0);
    endfunction

    function int unsigned steps();
      int unsigned n = 0;
      foreach (wr_addr[i]) if (wr_addr[i].size() > n) n = wr_addr[i].size();
      return n;
    endfunction

    function int unsigned entries();
      int unsigned n = 0;
      foreach (wr_addr[i]) n += wr_addr[i].size();
      return n;
    endfunction

    function int unsigned stage_entries(int unsigned p);
      return wr_addr[p].size();
    endfunction

    function addr_t rand_addr();
      addr_t r = {$urandom(), $urandom(), $urandom(), $urandom()};
      return r & mask(W);
    endfunction

    // A random routing table: lengths mostly 16 and 24, the rest 1..W.
    function void random_table(int unsigned n, int unsigned res_max);
      for (int i = 0; i < n; i++) begin
        int unsigned len;
        int unsigned r = $urandom_range(0, 9);
        if (r < 4)      len = 16;
        else if (r < 7) len = 24;
        else            len = $urandom_range(1, W);
        add_prefix(rand_addr(), len, $urandom_range(1, res_max));
      end
    endfunction

    // An address that matches prefix i in its first plen bits, random after.
    function addr_t addr_near(int unsigned i);
      return pv[i] | (rand_addr() & ~mask(plen[i]) & mask(W));
    endfunction
  endclass

endpackage
