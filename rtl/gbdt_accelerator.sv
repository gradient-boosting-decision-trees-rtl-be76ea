// gbdt_accelerator: pixel classifier that evaluates a gradient-boosted tree ensemble.
//
// The model is one-vs-all: every class owns its own set of trees, and a class's score
// is the sum of the leaf values its trees reach for the pixel. The class with the
// highest score is the prediction. Because the classes are independent, there is one
// class module per class, each with a private node memory, and all of them walk their
// trees in parallel on the same features register. The design:
//
//   feature stream -> feature_buffer (shadow + features register)
//                  -> N_CLASSES x class module (class_module_mt, or class_module_sc
//                     when MULTI_THREADED = 0) -> scores -> argmax -> prediction
//
// Control: when a complete pixel waits in the shadow buffer and no pixel is in
// progress, it is copied into the features register and, one cycle later, all class
// modules are started. The pixel is finished when every class module reports done
// (the AND of their done flags); its prediction, best score and all class scores are
// then captured into the output register (m_valid/m_ready). If the previous result
// has not been taken yet, the capture waits. The next pixel may stream in during the
// computation.
//
// Model load (only while idle, busy = 0): cfg_kind 0 writes node word cfg_data to
// address cfg_addr of class cfg_class's node memory; cfg_kind 1 and 2 set the start
// address of tree set 2 and set 3 of that class (ignored when MULTI_THREADED = 0).
//
// The busy and node-activity outputs of each class module are left unconnected at
// this level; they are kept as observation points for simulation.
//
// The parallel class modules, the shared features register, the AND of the finish
// flags and the argmax follow the published accelerator; the stream and output
// handshakes, the load port and this controller are this design's choice, since the
// published description leaves out control lines and communication.
module gbdt_accelerator
  import gbdt_pkg::*;
#(
  parameter int N_CLASSES      = 16,
  parameter int N_FEATURES     = 224,
  parameter int ADDR_W         = 13,
  parameter bit MULTI_THREADED = 1'b1,
  localparam int CLS_W         = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // pixel features, one per beat, feature 0 first
  input  logic                s_valid,
  output logic                s_ready,
  input  logic [FEAT_W-1:0]   s_data,
  // prediction
  output logic                m_valid,
  input  logic                m_ready,
  output logic [CLS_W-1:0]    m_class,
  output logic [RESULT_W-1:0] m_score,
  output logic [RESULT_W-1:0] m_scores [N_CLASSES],
  // model load
  input  logic                cfg_we,
  input  logic [CLS_W-1:0]    cfg_class,
  input  logic [1:0]          cfg_kind,
  input  logic [ADDR_W-1:0]   cfg_addr,
  input  node_word_t          cfg_data,
  output logic                busy
);

  localparam logic [1:0] CFG_NODE = 2'd0;
  localparam logic [1:0] CFG_INIT2 = 2'd1;
  localparam logic [1:0] CFG_INIT3 = 2'd2;

  logic              fb_full, fb_load;
  logic [FEAT_W-1:0] features [N_FEATURES];

  feature_buffer #(.N_FEATURES(N_FEATURES)) u_fb (
    .clk      (clk),
    .rst_n    (rst_n),
    .s_valid  (s_valid),
    .s_ready  (s_ready),
    .s_data   (s_data),
    .full     (fb_full),
    .load     (fb_load),
    .features (features)
  );

  // Controller.
  logic running, start_q, finish, capture;
  logic [N_CLASSES-1:0] cls_done;
  logic [RESULT_W-1:0]  scores [N_CLASSES];
  logic [CLS_W-1:0]     best_idx;
  logic [RESULT_W-1:0]  best_score;

  assign finish  = &cls_done;
  assign fb_load = !running && fb_full;
  assign capture = running && !start_q && finish && (!m_valid || m_ready);
  assign busy    = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      start_q <= 1'b0;
      m_valid <= 1'b0;
      m_class <= '0;
      m_score <= '0;
      for (int c = 0; c < N_CLASSES; c++) m_scores[c] <= '0;
    end else begin
      start_q <= fb_load;
      if (fb_load) running <= 1'b1;
      if (capture) begin
        running  <= 1'b0;
        m_valid  <= 1'b1;
        m_class  <= best_idx;
        m_score  <= best_score;
        m_scores <= scores;
      end else if (m_ready) begin
        m_valid <= 1'b0;
      end
    end
  end

  // Class modules.
  for (genvar c = 0; c < N_CLASSES; c++) begin : g_cls
    logic sel, mem_we, init_we;
    assign sel     = cfg_we && (cfg_class == CLS_W'(c));
    assign mem_we  = sel && (cfg_kind == CFG_NODE);
    assign init_we = sel && (cfg_kind == CFG_INIT2 || cfg_kind == CFG_INIT3);

    if (MULTI_THREADED) begin : g_mt
      logic       busy_c, nv, nr;
      logic [1:0] nt;
      class_module_mt #(.N_FEATURES(N_FEATURES), .ADDR_W(ADDR_W)) u_cls (
        .clk         (clk),
        .rst_n       (rst_n),
        .start       (start_q),
        .features    (features),
        .busy        (busy_c),
        .done        (cls_done[c]),
        .result      (scores[c]),
        .mem_we      (mem_we),
        .mem_waddr   (cfg_addr),
        .mem_wdata   (cfg_data),
        .init_we     (init_we),
        .init_sel    (cfg_kind == CFG_INIT3),
        .init_addr   (cfg_addr),
        .node_valid  (nv),
        .node_thread (nt),
        .node_right  (nr)
      );
    end else begin : g_sc
      logic busy_c, nv, nr;
      class_module_sc #(.N_FEATURES(N_FEATURES), .ADDR_W(ADDR_W)) u_cls (
        .clk        (clk),
        .rst_n      (rst_n),
        .start      (start_q),
        .features   (features),
        .busy       (busy_c),
        .done       (cls_done[c]),
        .result     (scores[c]),
        .mem_we     (mem_we),
        .mem_waddr  (cfg_addr),
        .mem_wdata  (cfg_data),
        .node_valid (nv),
        .node_right (nr)
      );
    end
  end

  argmax #(.N_CLASSES(N_CLASSES), .W(RESULT_W)) u_argmax (
    .scores (scores),
    .idx    (best_idx),
    .best   (best_score)
  );

  // A prediction that is not taken stays offered, unchanged.
  a_m_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             m_valid && !m_ready |=> m_valid && $stable(m_class) && $stable(m_score));
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !running);

endmodule
