// trie_model_pkg: software side of the lookup engine, for the testbenches.
//
// trie_db takes a routing table (prefix, length, next hop), builds the
// complete 16-way trie the engine searches, and lays it out the way the
// hardware expects it:
//   * SRAM: for every trie level, the child bitmaps of that level's internal
//     nodes in breadth-first order (1 = internal child), root implied. Each
//     level starts on a fresh 128-bit row; every row carries in its Sum field
//     the number of 1s of its level in earlier rows.
//   * level table: Level[i] = first SRAM bit of level i, and the number of 1s
//     on level i.
//   * DRAM: row r holds the 16 next hops of the children of the r-th internal
//     node (root = 0) in breadth-first order; an internal child's entry holds
//     the next hop inherited from the shorter prefixes above it.
// It also answers lookups directly from the prefix list (longest match by
// scanning), independently of the trie, and reports where a trie walk ends.
package trie_model_pkg;

  localparam int X = 16;

  class trie_db;
    // routing table
    int unsigned pfx_val[$];
    int          pfx_len[$];
    int          pfx_nh[$];
    int          default_nh;
    bit          seen[longint];  // routes already in the table

    // trie: node n has children n*16 .. n*16+15
    int          child[$];      // -1: leaf, otherwise node index
    int          leaf_nh[$];    // next hop of each child slot
    int          depth[$];

    // layout
    int          bfs[$];        // internal nodes in breadth-first order
    int          rank_of[$];    // node -> BFS rank
    int          grp_of[$];     // node -> position among its level's nodes
    int          nrows;
    bit [127:0]  row_bits[$];
    bit [19:0]   row_sum[$];
    int          level_start[8];
    int          level_total[8];
    int          dram[int];

    function new(int dflt);
      default_nh = dflt;
    endfunction

    // Adds a route; a prefix already in the table keeps its first next hop.
    function void add(int unsigned val, int len, int nh);
      longint key = (longint'(len) << 32) | longint'(val);
      if (seen.exists(key)) return;
      seen[key] = 1'b1;
      pfx_val.push_back(val);
      pfx_len.push_back(len);
      pfx_nh.push_back(nh);
    endfunction

    static function int unsigned pmask(int len);
      return (len == 0) ? 32'h0 : (32'hFFFF_FFFF << (32 - len));
    endfunction

    // Longest prefix match by scanning the table.
    function int lpm(int unsigned a);
      int best_len = -1;
      int best_nh  = default_nh;
      foreach (pfx_val[k]) begin
        if (((a ^ pfx_val[k]) & pmask(pfx_len[k])) == 0 && pfx_len[k] > best_len) begin
          best_len = pfx_len[k];
          best_nh  = pfx_nh[k];
        end
      end
      return best_nh;
    endfunction

    function int new_node(int nh, int d);
      int n = child.size() / X;
      for (int c = 0; c < X; c++) begin
        child.push_back(-1);
        leaf_nh.push_back(nh);
      end
      depth.push_back(d);
      return n;
    endfunction

    function void build();
      int order[$];
      int n, c, full, rem, base, cnt, row, bitpos, ones_in_level, r0;
      child.delete(); leaf_nh.delete(); depth.delete();
      void'(new_node(default_nh, 0));
      // shorter prefixes first, so parents are filled before children
      for (int len = 0; len <= 32; len++)
        foreach (pfx_len[k]) if (pfx_len[k] == len) order.push_back(k);
      foreach (order[oi]) begin
        int k = order[oi];
        int len = pfx_len[k];
        if (len == 0) begin
          for (c = 0; c < X; c++) leaf_nh[c] = pfx_nh[k];
          continue;
        end
        full = (len - 1) / 4;          // levels passed through completely
        rem  = len - 4 * full;         // 1..4 bits used on the last level
        n = 0;
        for (int l = 0; l < full; l++) begin
          c = (pfx_val[k] >> (28 - 4 * l)) & 15;
          if (child[n*X + c] < 0) begin
            int m = new_node(leaf_nh[n*X + c], l + 1);
            child[n*X + c] = m;
          end
          n = child[n*X + c];
        end
        base = (pfx_val[k] >> (28 - 4 * full)) & 15 & (15 << (4 - rem));
        cnt  = 1 << (4 - rem);
        for (c = base; c < base + cnt; c++)
          leaf_nh[n*X + c] = pfx_nh[k];
      end
      // breadth-first numbering
      bfs.delete(); rank_of.delete();
      foreach (depth[i]) rank_of.push_back(-1);
      bfs.push_back(0);
      for (int q = 0; q < bfs.size(); q++)
        for (c = 0; c < X; c++)
          if (child[bfs[q]*X + c] >= 0) bfs.push_back(child[bfs[q]*X + c]);
      foreach (bfs[q]) rank_of[bfs[q]] = q;
      grp_of.delete();
      foreach (depth[i]) grp_of.push_back(0);
      begin
        int cnt_d[9];
        foreach (cnt_d[d]) cnt_d[d] = 0;
        foreach (bfs[q]) begin
          grp_of[bfs[q]] = cnt_d[depth[bfs[q]]];
          cnt_d[depth[bfs[q]]]++;
        end
      end
      // SRAM layout, one level after the other, each on fresh rows
      row_bits.delete(); row_sum.delete(); dram.delete();
      row = 0;
      for (int l = 0; l < 8; l++) begin
        level_start[l] = row * 128;
        ones_in_level = 0;
        bitpos = 0;
        r0 = row;
        row_bits.push_back('0); row_sum.push_back('0);
        foreach (bfs[q]) begin
          if (depth[bfs[q]] != l) continue;
          for (c = 0; c < X; c++) begin
            if (bitpos == 128) begin
              row++; bitpos = 0;
              row_bits.push_back('0); row_sum.push_back(20'(ones_in_level));
            end
            if (child[bfs[q]*X + c] >= 0) begin
              row_bits[row][bitpos] = 1'b1;
              ones_in_level++;
            end
            bitpos++;
          end
        end
        level_total[l] = ones_in_level;
        row++;
      end
      nrows = row;
      foreach (bfs[q])
        for (c = 0; c < X; c++) dram[q*X + c] = leaf_nh[bfs[q]*X + c];
    endfunction

    // Level at which the trie walk for address a stops (0..7), and the DRAM
    // index it reads.
    function void walk(int unsigned a, output int end_level, output int index);
      int n = 0;
      int c;
      for (int l = 0; l < 8; l++) begin
        c = (a >> (28 - 4 * l)) & 15;
        if (child[n*X + c] < 0 || l == 7) begin
          end_level = l;
          index = rank_of[n] * X + c;
          return;
        end
        n = child[n*X + c];
      end
      end_level = 7; index = 0;
    endfunction

    // DRAM index the trie walk for address a reads.
    function int index_of(int unsigned a);
      int l, idx;
      walk(a, l, idx);
      return idx;
    endfunction

    // Row (relative to the start of its level) holding the bit read at
    // level l for address a; > 0 means the row's Sum field is used.
    function int row_in_level(int unsigned a, int l);
      int n = 0, c;
      for (int k = 0; k < l; k++) begin
        c = (a >> (28 - 4 * k)) & 15;
        n = child[n*X + c];
        if (n < 0) return 0;
      end
      c = (a >> (28 - 4 * l)) & 15;
      return (grp_of[n] * X + c) / 128;
    endfunction

    // The routing table of the published 16-way example.
    function void load_example();
      add(32'h8000_0000,  2,  3);
      add(32'h8000_0000,  4,  6);
      add(32'h8C00_0000,  8,  3);
      add(32'h8C0C_0000, 16,  2);
      add(32'h4000_0000,  2,  7);
      add(32'h4000_0000,  8, 12);
      add(32'h2600_0000,  8,  5);
      add(32'h7000_0000,  4,  9);
      add(32'h7030_0000, 14,  5);
      add(32'h5000_0000,  4,  2);
    endfunction

    // A random table of n prefixes, lengths 1..32, next hops 1..255.
    function void load_random(int n);
      for (int i = 0; i < n; i++) begin
        int len = 1 + ($urandom % 32);
        if (i % 4 == 0) len = 24 + ($urandom % 9);   // many long prefixes
        add($urandom & pmask(len), len, 1 + ($urandom % 255));
      end
    endfunction

    // A table shaped like a backbone table: n routes, mostly /24 and /16../23,
    // clustered in `blocks` /16 blocks (inside a few hundred /8s), with some
    // shorter and longer routes.
    function void load_backbone(int n, int blocks);
      int unsigned blk[$];
      for (int b = 0; b < blocks; b++) blk.push_back(($urandom % 224) << 24 | ($urandom % 256) << 16);
      while (pfx_val.size() < n) begin
        int r = $urandom % 100;
        int len = (r < 55) ? 24 : (r < 85) ? 16 + ($urandom % 8) : (r < 95) ? 8 + ($urandom % 8)
                                                                         : 25 + ($urandom % 8);
        int unsigned base = blk[$urandom % blocks] | ($urandom & 32'h0000_FFFF);
        add(base & pmask(len), len, 1 + ($urandom % 255));
      end
    endfunction

    // An address that falls under a random table prefix.
    function int unsigned pick_addr();
      int k;
      if (pfx_val.size() == 0 || $urandom % 8 == 0) return $urandom;
      k = $urandom % pfx_val.size();
      return pfx_val[k] | ($urandom & ~pmask(pfx_len[k]));
    endfunction
  endclass

endpackage
