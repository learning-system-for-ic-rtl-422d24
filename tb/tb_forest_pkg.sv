// tb_forest_pkg: random decision-tree generator and reference evaluator for
// the classifier testbenches.
//
// 'forest_model' builds random trees in the 512 x 40-bit node format (root at
// address 0, numerical nodes and leaves in the lower half, categorical nodes
// as two words from address 256 up) and evaluates them with a software walk
// written independently of the RTL. Feature vectors use the 42-bit layout
// {f1[3:0], f2[3:0], f3..f6[7:0], f7, f8}.
package tb_forest_pkg;

  class forest_model;
    int unsigned nt;
    int unsigned max_depth;
    bit [39:0]   mem[][512];
    int unsigned next_num, next_cat;

    function new(int unsigned n_trees, int unsigned depth_limit = 10);
      nt        = n_trees;
      max_depth = depth_limit;
      mem       = new[n_trees];
    endfunction

    static function bit is_cat(int unsigned idx);
      return idx == 1 || idx == 2 || idx == 7 || idx == 8;
    endfunction

    // feature idx (1..8) of a 42-bit vector
    static function int unsigned feat_of(bit [41:0] f, int unsigned idx);
      case (idx)
        1: return f[41:38];
        2: return f[37:34];
        3: return f[33:26];
        4: return f[25:18];
        5: return f[17:10];
        6: return f[9:2];
        7: return f[1];
        8: return f[0];
        default: return 0;
      endcase
    endfunction

    static function bit [41:0] rand_features();
      bit [41:0] f;
      f[41:38] = 4'($urandom);
      f[37:34] = 4'($urandom);
      f[33:26] = 8'($urandom);
      f[25:18] = 8'($urandom);
      f[17:10] = 8'($urandom);
      f[9:2]   = 8'($urandom);
      f[1]     = 1'($urandom);
      f[0]     = 1'($urandom);
      return f;
    endfunction

    // write a node at a preallocated address, recurse into sons
    function void gen_node(int unsigned t, int unsigned addr, int unsigned idx, int unsigned depth);
      bit [39:0] w1, w2;
      int unsigned l, r, li, ri;
      bit leaf;
      leaf = (depth >= max_depth) || ($urandom_range(99) < 25 && depth > 0)
             || next_num > 250 || next_cat > 508;
      w1 = '0;
      if (leaf) begin
        w1[33] = 1'b1;
        w1[32] = 1'($urandom);
        w1[39:36] = 4'($urandom);   // feature index of a leaf is don't care
        w1[31:0]  = $urandom;       // as are threshold and sons
        mem[t][addr] = w1;
        return;
      end
      w1[39:36] = 4'(idx);
      w1[35:34] = 2'($urandom);
      w1[32]    = 1'($urandom);
      w1[31:24] = 8'($urandom);
      li = $urandom_range(8, 1);
      ri = $urandom_range(8, 1);
      l = alloc(li);
      r = alloc(ri);
      w1[23:12] = 12'(l);
      w1[11:0]  = 12'(r);
      mem[t][addr] = w1;
      if (is_cat(idx)) begin
        w2 = {8'($urandom), 32'($urandom)};
        if (idx >= 7) for (int k = 0; k < 8; k++) w2[4*k +: 4] = 4'($urandom_range(1));
        mem[t][addr+1] = w2;
      end
      gen_node(t, l, li, depth + 1);
      gen_node(t, r, ri, depth + 1);
    endfunction

    function int unsigned alloc(int unsigned idx);
      int unsigned a;
      if (is_cat(idx) && next_cat <= 508) begin
        a = next_cat; next_cat += 2;
      end else begin
        a = next_num; next_num += 1;
      end
      return a;
    endfunction

    function void build();
      for (int unsigned t = 0; t < nt; t++) begin
        for (int a = 0; a < 512; a++) mem[t][a] = {$urandom, 8'($urandom)};
        next_cat = 256;
        gen_node_root(t);
      end
    endfunction

    // the root sits at address 0 (and 1 when categorical)
    function void gen_node_root(int unsigned t);
      int unsigned idx = $urandom_range(8, 1);
      next_num = is_cat(idx) ? 2 : 1;
      gen_node(t, 0, idx, 0);
    endfunction

    // walk one tree; returns prediction, path length in nodes via nodes
    function bit eval_tree(int unsigned t, bit [41:0] f, output int unsigned nodes);
      int unsigned a = 0;
      nodes = 0;
      forever begin
        bit [39:0] w1, w2;
        int unsigned idx, v;
        bit left;
        w1 = mem[t][a];
        w2 = mem[t][(a + 1) % 512];
        nodes++;
        if (w1[33]) return w1[32];
        idx = w1[39:36];
        v   = feat_of(f, idx);
        if (is_cat(idx)) begin
          left = 0;
          for (int k = 0; k < 8; k++)
            if (w1[24 + k] && w2[4*k +: 4] == (v % 16)) left = 1;
        end else begin
          left = v < w1[31:24];
        end
        a = left ? w1[20:12] : w1[8:0];
        if (nodes > 600) return 0;
      end
    endfunction

    // majority vote of all trees; max path length through maxn
    function bit eval_forest(bit [41:0] f, output int unsigned votes, output int unsigned maxn);
      int unsigned n;
      votes = 0; maxn = 0;
      for (int unsigned t = 0; t < nt; t++) begin
        votes += eval_tree(t, f, n);
        if (n > maxn) maxn = n;
      end
      return votes > nt / 2;
    endfunction
  endclass

endpackage
