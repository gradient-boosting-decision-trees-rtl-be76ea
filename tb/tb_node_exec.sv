// tb_node_exec: checks the node execute logic on random non-leaf and leaf words,
// including features equal to the comparison value, against values worked out here.
module tb_node_exec;
  import gbdt_pkg::*;
  localparam int AW = 13;

  node_word_t          node;
  logic [FEAT_W-1:0]   feature;
  logic [AW-1:0]       last_addr, next_addr;
  logic                is_leaf, is_last_tree, go_right;
  logic [RESULT_W-1:0] leaf_ext;
  int checks = 0, failures = 0;

  node_exec #(.ADDR_W(AW)) dut (.*);

  task automatic check(input logic [AW-1:0] exp_next, input logic exp_leaf, input logic exp_last,
                       input logic exp_right, input logic [RESULT_W-1:0] exp_ext);
    #1;
    checks++;
    if (next_addr !== exp_next || is_leaf !== exp_leaf || is_last_tree !== exp_last ||
        go_right !== exp_right || (exp_leaf && leaf_ext !== exp_ext)) begin
      failures++;
      $display("node %h feature %0d addr %0d: next %0d/%0d leaf %b/%b last %b/%b right %b/%b ext %h/%h",
               node, feature, last_addr, next_addr, exp_next, is_leaf, exp_leaf,
               is_last_tree, exp_last, go_right, exp_right, leaf_ext, exp_ext);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cmp, rel, f, v, nt;
    bit last;
    for (int i = 0; i < 3000; i++) begin
      // Non-leaf.
      cmp = $urandom_range(0, 65535);
      rel = $urandom_range(1, 127);
      case (i % 3)
        0: f = cmp;                           // equal goes left
        1: f = $urandom_range(0, 65535);
        default: f = (cmp < 65535) ? cmp + 1 : cmp;
      endcase
      last_addr = AW'($urandom);
      feature   = FEAT_W'(f);
      node      = make_inner(FEAT_IDX_W'($urandom), CMP_W'(cmp), REL_W'(rel));
      check((f <= cmp) ? AW'(last_addr + 1) : AW'(last_addr + rel), 1'b0, 1'b0, f > cmp, '0);
      // Leaf.
      v    = $urandom_range(0, 65535) - 32768;
      nt   = $urandom_range(0, 2 ** NEXT_W - 1);
      last = 1'($urandom);
      node = make_leaf(LEAF_W'(v), NEXT_W'(nt), last);
      feature = FEAT_W'($urandom);
      check(AW'(nt), 1'b1, last, 1'b0, RESULT_W'(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
