// class_module_sc: single-cycle engine that evaluates all trees of one class.
//
// All trees of the class form one chain starting at address 0, linked by the
// @_next_tree field of their leaves; the last tree's leaves carry the last-tree flag.
// One register, last_node, holds the address of the node being executed. Each cycle
// the node word of last_node comes out of the synchronous node memory, its feature is
// selected and compared (node_exec), and the next address is written both to
// last_node and to the memory's read address, so one node is executed per clock with
// the whole fetch-select-compare-add path in a single cycle. Leaf values are added to
// the class score.
//
// Timing: start (one cycle, only while not busy) reads address 0; if the chain visits
// n nodes, done is high from n clock edges after the start edge, with result final.
// This follows the published first version of the class module, which the
// multi-threaded module replaces; handshake, reset and load port are this design's.
module class_module_sc
  import gbdt_pkg::*;
#(
  parameter int N_FEATURES = 224,
  parameter int ADDR_W     = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [FEAT_W-1:0]     features [N_FEATURES],
  output logic                  busy,
  output logic                  done,
  output logic [RESULT_W-1:0]   result,
  input  logic                  mem_we,
  input  logic [ADDR_W-1:0]     mem_waddr,
  input  node_word_t            mem_wdata,
  output logic                  node_valid, // a node is executed this cycle
  output logic                  node_right  // that node took its right child
);

  logic [ADDR_W-1:0]   last_node;
  node_word_t          node;
  logic [FEAT_IDX_W-1:0] feature_idx;
  logic [FEAT_W-1:0]   feat_sel;
  logic [ADDR_W-1:0]   next_addr;
  logic                is_leaf, is_last_tree, go_right;
  logic [RESULT_W-1:0] leaf_ext;
  logic [ADDR_W-1:0]   rd_addr;
  logic                rd_en;

  assign rd_addr = start ? '0 : next_addr;
  assign rd_en   = start || (busy && !is_last_tree);

  trees_nodes_ram #(.ADDR_W(ADDR_W), .DATA_W(NODE_W)) u_ram (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (node)
  );

  assign feature_idx = node[NODE_W-1 -: FEAT_IDX_W];

  always_comb begin
    feat_sel = '0;
    for (int i = 0; i < N_FEATURES; i++)
      if (FEAT_IDX_W'(i) == feature_idx) feat_sel = features[i];
  end

  node_exec #(.ADDR_W(ADDR_W)) u_exec (
    .node         (node),
    .feature      (feat_sel),
    .last_addr    (last_node),
    .next_addr    (next_addr),
    .is_leaf      (is_leaf),
    .is_last_tree (is_last_tree),
    .go_right     (go_right),
    .leaf_ext     (leaf_ext)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      result    <= '0;
      last_node <= '0;
    end else if (start) begin
      busy      <= 1'b1;
      done      <= 1'b0;
      result    <= '0;
      last_node <= '0;
    end else if (busy) begin
      last_node <= next_addr;
      if (is_leaf) result <= result + leaf_ext;
      if (is_last_tree) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign node_valid = busy;
  assign node_right = busy && go_right;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_load_idle:  assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> !busy);

endmodule
