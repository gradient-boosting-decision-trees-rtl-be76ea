// class_module_mt: multi-threaded engine that evaluates all trees of one class.
//
// The trees of the class are split into three sets stored one after another in the
// class's node memory; each set is a chain of trees linked by the @_next_tree field of
// their leaves and ends with a leaf whose last-tree flag is set. Set 1 starts at
// address 0, sets 2 and 3 at the addresses held in the initial_2 and initial_3
// registers. Each set has its own node-address register (addr_1..addr_3), so three
// trees are traversed at once, interleaved through a three-stage pipeline:
//   stage 1 (fetch)   the thread whose turn it is presents its address to the memory;
//   stage 2 (decode)  the node word arrives and its @_feature field selects one input
//                     feature, registered together with the node word;
//   stage 3 (execute) comparison, next-address computation (node_exec), the leaf value
//                     is added to the class score and the thread's address register
//                     is written.
// Threads take turns in fixed round-robin order, so a thread's next address is ready
// exactly when its next fetch slot comes: one node enters the pipeline every cycle and
// no prediction is needed. A thread that has executed the last leaf of its set sets
// its end flag and leaves its slots empty; done rises when all three flags are set.
//
// Timing: start (one cycle, only while not busy) clears the score and flags. If set t
// (t = 0,1,2) visits n_t nodes, done is high from 3*n_t + t clock edges after the
// start edge for the largest such value, and result is final at that point. done and
// result hold until the next start. The pipeline organisation, the three address
// registers, the two initial registers and the three end flags follow the published
// multi-threaded class module; the handshake, reset and load ports are this design's.
module class_module_mt
  import gbdt_pkg::*;
#(
  parameter int N_FEATURES = 224,
  parameter int ADDR_W     = 13
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // one pixel
  input  logic                  start,
  input  logic [FEAT_W-1:0]     features [N_FEATURES],
  output logic                  busy,
  output logic                  done,
  output logic [RESULT_W-1:0]   result,
  // model load (only while not busy)
  input  logic                  mem_we,
  input  logic [ADDR_W-1:0]     mem_waddr,
  input  node_word_t            mem_wdata,
  input  logic                  init_we,
  input  logic                  init_sel,   // 0: initial_2, 1: initial_3
  input  logic [ADDR_W-1:0]     init_addr,
  // activity, for observation
  output logic                  node_valid, // a node is executed this cycle
  output logic [1:0]            node_thread,// and which set it belongs to
  output logic                  node_right  // that node took its right child
);

  localparam int TID_W = 2;

  // Thread state.
  logic [ADDR_W-1:0] addr_q [N_THREADS];
  logic [ADDR_W-1:0] initial_q [2];       // initial_2, initial_3
  logic [N_THREADS-1:0] end_q;
  logic [TID_W-1:0]  tid_f;               // thread in the fetch slot

  // Stage 1 -> 2.
  logic              v2;
  logic [TID_W-1:0]  tid2;
  logic [ADDR_W-1:0] last_addr_1;
  node_word_t        ram_rdata;

  // Stage 2 -> 3.
  logic              v3;
  logic [TID_W-1:0]  tid3;
  logic [ADDR_W-1:0] last_addr_2;
  node_word_t        node_q;
  logic [FEAT_W-1:0] feature_q;

  // Stage 1: fetch.
  logic              fetch_v;
  logic [ADDR_W-1:0] curr_addr;

  assign fetch_v   = busy && !end_q[tid_f];
  assign curr_addr = addr_q[tid_f];

  trees_nodes_ram #(.ADDR_W(ADDR_W), .DATA_W(NODE_W)) u_ram (
    .clk   (clk),
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .re    (fetch_v),
    .raddr (curr_addr),
    .rdata (ram_rdata)
  );

  // Stage 2: feature select.
  logic [FEAT_IDX_W-1:0] dec_feature;
  logic [FEAT_W-1:0]     feat_sel;

  assign dec_feature = ram_rdata[NODE_W-1 -: FEAT_IDX_W];

  always_comb begin
    feat_sel = '0;
    for (int i = 0; i < N_FEATURES; i++)
      if (FEAT_IDX_W'(i) == dec_feature) feat_sel = features[i];
  end

  // Stage 3: execute.
  logic [ADDR_W-1:0]   next_addr;
  logic                is_leaf, is_last_tree, go_right;
  logic [RESULT_W-1:0] leaf_ext;
  logic [N_THREADS-1:0] end_next;

  node_exec #(.ADDR_W(ADDR_W)) u_exec (
    .node         (node_q),
    .feature      (feature_q),
    .last_addr    (last_addr_2),
    .next_addr    (next_addr),
    .is_leaf      (is_leaf),
    .is_last_tree (is_last_tree),
    .go_right     (go_right),
    .leaf_ext     (leaf_ext)
  );

  always_comb begin
    end_next = end_q;
    if (v3 && is_last_tree) end_next[tid3] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      result      <= '0;
      end_q       <= '0;
      tid_f       <= '0;
      v2          <= 1'b0;
      v3          <= 1'b0;
      tid2        <= '0;
      tid3        <= '0;
      last_addr_1 <= '0;
      last_addr_2 <= '0;
      node_q      <= '0;
      feature_q   <= '0;
      for (int t = 0; t < N_THREADS; t++) addr_q[t] <= '0;
      initial_q[0] <= '0;
      initial_q[1] <= '0;
    end else begin
      if (init_we) initial_q[init_sel] <= init_addr;

      if (start) begin
        busy      <= 1'b1;
        done      <= 1'b0;
        result    <= '0;
        end_q     <= '0;
        tid_f     <= '0;
        v2        <= 1'b0;
        v3        <= 1'b0;
        addr_q[0] <= '0;
        addr_q[1] <= initial_q[0];
        addr_q[2] <= initial_q[1];
      end else if (busy) begin
        // Round-robin fetch slot.
        tid_f <= (tid_f == TID_W'(N_THREADS-1)) ? '0 : tid_f + 1'b1;
        // Stage 1 -> 2.
        v2          <= fetch_v;
        tid2        <= tid_f;
        last_addr_1 <= curr_addr;
        // Stage 2 -> 3.
        v3          <= v2;
        tid3        <= tid2;
        last_addr_2 <= last_addr_1;
        node_q      <= ram_rdata;
        feature_q   <= feat_sel;
        // Stage 3 results.
        if (v3) begin
          addr_q[tid3] <= next_addr;
          if (is_leaf) result <= result + leaf_ext;
        end
        end_q <= end_next;
        if (&end_next) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign node_valid  = v3;
  assign node_thread = tid3;
  assign node_right  = v3 && go_right;

  // A new pixel or a model write must not arrive while a pixel is in progress.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_load_idle:  assert property (@(posedge clk) disable iff (!rst_n) (mem_we || init_we) |-> !busy);

endmodule
