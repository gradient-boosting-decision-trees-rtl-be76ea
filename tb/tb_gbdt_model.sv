// tb_gbdt_model: reference model used by the testbenches.
//
// gbdt_class_model holds the node memory image of one class. It generates random
// trees in the node format (pre-order, left child next, right child at a relative
// distance, leaves pointing at the next tree) and evaluates them by a plain software
// walk, independent of the RTL, giving the class score and the number of nodes each
// tree set visits.
package tb_gbdt_model;
  import gbdt_pkg::*;

  class gbdt_class_model;
    node_word_t mem [];
    int         size;
    int         n_features;
    int         set_start [3];
    int         n_sets;

    function new(int depth, int nf);
      mem = new[depth];
      foreach (mem[i]) mem[i] = '0;
      size       = 0;
      n_features = nf;
      n_sets     = 0;
    endfunction

    // Append one random tree of at most max_depth levels of comparisons (max_depth <= 6
    // keeps every right-child distance within the 7-bit field). Leaf addresses are
    // returned for patching of their next-tree field.
    function void gen_tree(int max_depth, int p_inner, ref int leaves[$]);
      int st_p[$];
      int st_d[$];
      int d, p, q;
      d = 0;
      forever begin
        p = size;
        size++;
        if (d < max_depth && (d == 0 || $urandom_range(0, 99) < p_inner)) begin
          mem[p] = make_inner(FEAT_IDX_W'($urandom_range(0, n_features - 1)),
                              CMP_W'($urandom), '0);
          st_p.push_back(p);
          st_d.push_back(d);
          d++;
        end else begin
          mem[p] = make_leaf(LEAF_W'($urandom), '0, 1'b0);
          leaves.push_back(p);
          if (st_p.size() == 0) break;
          q = st_p.pop_back();
          d = st_d.pop_back() + 1;
          mem[q][7:1] = REL_W'(size - q);
        end
      end
    endfunction

    // Append a set: a chain of n_trees trees whose last tree ends the set.
    function void gen_set(int n_trees, int max_depth, int p_inner);
      set_start[n_sets] = size;
      n_sets++;
      for (int t = 0; t < n_trees; t++) begin
        int leaves[$];
        gen_tree(max_depth, p_inner, leaves);
        foreach (leaves[i]) begin
          mem[leaves[i]][15:2] = NEXT_W'(size);
          mem[leaves[i]][1]    = (t == n_trees - 1);
        end
      end
    endfunction

    // Walk one set; returns its score contribution, nodes visited in 'nodes'.
    function int eval_set(int s, logic [FEAT_W-1:0] feat [], output int nodes);
      int a, acc;
      node_word_t w;
      a = set_start[s];
      acc = 0;
      nodes = 0;
      forever begin
        w = mem[a];
        nodes++;
        if (w[0]) begin
          acc += int'(signed'(w[31:16]));
          if (w[1]) break;
          a = int'(w[15:2]);
        end else if (feat[w[31:24]] <= w[23:8]) begin
          a = a + 1;
        end else begin
          a = a + int'(w[7:1]);
        end
      end
      return acc;
    endfunction
  endclass

endpackage
