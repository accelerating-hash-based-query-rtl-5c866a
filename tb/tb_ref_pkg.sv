// tb_ref_pkg: reference functions for the testbenches.
//
// ref_hash computes the hash index the engine is expected to use, bit by
// bit and independently of the pipelined hardware: a 32-bit Galois LFSR with
// polynomial 0x04C11DB7, seeded with all ones, fed with the key MSB first;
// the index is the low 23 bits of the final state.
package tb_ref_pkg;
  function automatic logic [31:0] ref_lfsr(logic [31:0] key);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    for (int i = 31; i >= 0; i--) begin
      if (c[31] ^ key[i]) c = (c << 1) ^ 32'h04C1_1DB7;
      else                c = c << 1;
    end
    return c;
  endfunction

  function automatic logic [22:0] ref_hash(logic [31:0] key);
    logic [31:0] c;
    c = ref_lfsr(key);
    return c[22:0];
  endfunction

  // Keys that share a hash index, found by hashing random keys.
  // coll_a[i] and coll_b[i] collide; triple[0..2] share one index.
  logic [31:0] coll_a[$], coll_b[$], triple[$];
  // line_a[i] and line_b[i] have different hash indexes whose low
  // LINE_BITS bits agree (they share a line of the direct-mapped cache).
  logic [31:0] line_a[$], line_b[$];

  function automatic void search_lines(int n_try, int line_bits);
    logic [31:0] seen [logic [22:0]];
    line_a.delete(); line_b.delete();
    for (int i = 0; i < n_try; i++) begin
      logic [31:0] k;
      logic [22:0] h, l;
      k = $urandom;
      h = ref_hash(k);
      l = h & ((23'd1 << line_bits) - 1);
      if (!seen.exists(l)) seen[l] = k;
      else if (ref_hash(seen[l]) != h) begin
        line_a.push_back(seen[l]);
        line_b.push_back(k);
        seen.delete(l);
      end
    end
  endfunction

  function automatic void search_collisions(int n_try);
    logic [31:0] first  [logic [22:0]];
    logic [31:0] second [logic [22:0]];
    coll_a.delete(); coll_b.delete(); triple.delete();
    for (int i = 0; i < n_try; i++) begin
      logic [31:0] k;
      logic [22:0] h;
      k = $urandom;
      h = ref_hash(k);
      if (!first.exists(h)) first[h] = k;
      else if (first[h] == k) continue;
      else if (!second.exists(h)) begin
        second[h] = k;
        coll_a.push_back(first[h]);
        coll_b.push_back(k);
      end else if (second[h] != k && triple.size() == 0) begin
        triple.push_back(first[h]);
        triple.push_back(second[h]);
        triple.push_back(k);
      end
    end
  endfunction
endpackage
