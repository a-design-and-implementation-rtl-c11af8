// ipv6_ref_pkg: software reference for the lookup engine's testbenches. It
// keeps the route list as plain queues and answers longest-prefix-match
// queries by scanning all of them, independently of how the hardware stores
// the routes.
package ipv6_ref_pkg;

  function automatic logic [63:0] mask64(input int l);
    logic [63:0] m;
    m = '0;
    for (int b = 0; b < l; b++) m[63-b] = 1'b1;
    return m;
  endfunction

  class route_table;
    logic [63:0] pfx [$];
    int          len [$];
    logic [7:0]  nh  [$];

    function int find(input logic [63:0] p, input int l);
      foreach (pfx[i]) if (len[i] == l && pfx[i] == (p & mask64(l))) return i;
      return -1;
    endfunction

    function void add(input logic [63:0] p, input int l, input logic [7:0] n);
      int i;
      i = find(p, l);
      if (i >= 0) nh[i] = n;
      else begin
        pfx.push_back(p & mask64(l)); len.push_back(l); nh.push_back(n);
      end
    endfunction

    function void remove(input logic [63:0] p, input int l);
      int i;
      i = find(p, l);
      if (i >= 0) begin pfx.delete(i); len.delete(i); nh.delete(i); end
    endfunction

    // longest match; returns the length or -1
    function int lookup(input logic [127:0] a, output logic [7:0] n);
      int best;
      best = -1;
      n = '0;
      foreach (pfx[i])
        if (((a[127:64] ^ pfx[i]) & mask64(len[i])) == '0 && len[i] > best) begin
          best = len[i]; n = nh[i];
        end
      return best;
    endfunction

    // an address inside route i, the remaining bits random
    function logic [127:0] addr_in(input int i);
      logic [127:0] a;
      a = {$urandom, $urandom, $urandom, $urandom};
      a[127:64] = pfx[i] | (a[127:64] & ~mask64(len[i]));
      return a;
    endfunction
  endclass

endpackage
