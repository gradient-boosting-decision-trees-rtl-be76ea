// tb_accel_env: end-to-end test environment for gbdt_accelerator.
//
// Builds a random one-vs-all model (per class: three tree sets for the multi-threaded
// engine, or one chain for the single-cycle engine), loads it through the model-load
// port, streams random pixels with random gaps, takes predictions with random
// back-pressure, and checks for every pixel the predicted class, its score, all class
// scores and the number of cycles from start to finish against the software model.
// It also counts how often each mechanism of the design occurred (input back-pressure,
// input streamed during computation, output capture held by back-pressure, left and
// right child steps, next-tree jumps, a set finished while others still run) and
// counts a failure for any that never did. With DEFAULTS set the accelerator is
// instantiated with its own default parameters and the other size parameters must
// match them.
module tb_accel_env
  import gbdt_pkg::*;
  import tb_gbdt_model::*;
#(
  parameter bit DEFAULTS   = 1'b0,
  parameter int NC         = 4,
  parameter int NF         = 32,
  parameter int AW         = 10,
  parameter bit MT         = 1'b1,
  parameter int N_PIXELS   = 20,
  parameter int TREES      = 6,     // trees per set (multi-threaded) on average
  parameter int SPREAD_PCT = 50,    // sets hold TREES +/- this percentage of trees
  parameter int MAX_DEPTH  = 5,
  parameter int P_INNER    = 60,
  parameter int WATCHDOG   = 400000
) (
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int CLS_W = (NC > 1) ? $clog2(NC) : 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_valid = 1'b0, s_ready;
  logic [FEAT_W-1:0] s_data = '0;
  logic m_valid, m_ready = 1'b0;
  logic [CLS_W-1:0] m_class;
  logic [RESULT_W-1:0] m_score;
  logic [RESULT_W-1:0] m_scores [NC];
  logic cfg_we = 1'b0;
  logic [CLS_W-1:0] cfg_class = '0;
  logic [1:0] cfg_kind = '0;
  logic [AW-1:0] cfg_addr = '0;
  node_word_t cfg_data = '0;
  logic busy;

  always #5 clk = ~clk;

  if (DEFAULTS) begin : g_dut
    gbdt_accelerator dut (.*);
  end else begin : g_dut
    gbdt_accelerator #(.N_CLASSES(NC), .N_FEATURES(NF), .ADDR_W(AW), .MULTI_THREADED(MT)) dut (.*);
  end

  // Expected results, per pixel.
  logic [FEAT_W-1:0] px [N_PIXELS][NF];
  int exp_score [N_PIXELS][NC];
  int exp_class [N_PIXELS];
  int exp_cycles [N_PIXELS];
  int total_nodes [N_PIXELS];
  int slow_nodes [N_PIXELS];   // nodes visited by the class with the most work

  // Mechanism counters.
  int n_in_stall = 0, n_overlap = 0, n_out_hold = 0, n_right = 0, n_left = 0, n_leaf = 0,
      n_set_done_early = 0;
  int got = 0;
  int hold_left = 0;
  longint sum_cycles = 0;
  bit  all_loaded = 1'b0;

  initial begin
    finished = 1'b0;
    checks   = 0;
    failures = 0;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles, %0d of %0d predictions", WATCHDOG, got, N_PIXELS);
    finished = 1'b1;
  end

  // Model build and load.
  gbdt_class_model m [NC];

  task automatic cfg_write(int c, logic [1:0] kind, int a, node_word_t d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_class = CLS_W'(c); cfg_kind = kind; cfg_addr = AW'(a); cfg_data = d;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NC; c++) begin
      m[c] = new(2 ** AW, NF);
      if (MT) begin
        for (int s = 0; s < 3; s++)
          m[c].gen_set($urandom_range(TREES - TREES * SPREAD_PCT / 100, TREES + TREES * SPREAD_PCT / 100),
                       MAX_DEPTH, P_INNER);
      end else begin
        m[c].gen_set(3 * TREES, MAX_DEPTH, P_INNER);
      end
      if (m[c].size > 2 ** AW) $fatal(1, "model does not fit");
      for (int a = 0; a < m[c].size; a++) cfg_write(c, 2'd0, a, m[c].mem[a]);
      if (MT) begin
        cfg_write(c, 2'd1, m[c].set_start[1], '0);
        cfg_write(c, 2'd2, m[c].set_start[2], '0);
      end
    end
    @(negedge clk);
    cfg_we = 1'b0;
    // Expected results.
    for (int p = 0; p < N_PIXELS; p++) begin
      logic [FEAT_W-1:0] f [];
      int n, best;
      f = new[NF];
      foreach (f[i]) begin
        f[i] = FEAT_W'($urandom);
        px[p][i] = f[i];
      end
      exp_cycles[p] = 0;
      total_nodes[p] = 0;
      slow_nodes[p] = 0;
      for (int c = 0; c < NC; c++) begin
        int cyc, cn;
        exp_score[p][c] = 0;
        cyc = 0;
        cn = 0;
        for (int s = 0; s < m[c].n_sets; s++) begin
          exp_score[p][c] += m[c].eval_set(s, f, n);
          total_nodes[p] += n;
          cn += n;
          if (MT) begin
            if (3 * n + s > cyc) cyc = 3 * n + s;
          end else begin
            cyc = n;
          end
        end
        if (cyc > exp_cycles[p]) exp_cycles[p] = cyc;
        if (cn > slow_nodes[p]) slow_nodes[p] = cn;
      end
      best = 0;
      for (int c = 1; c < NC; c++) if (exp_score[p][c] > exp_score[p][best]) best = c;
      exp_class[p] = best;
    end
    all_loaded = 1'b1;
  end

  // Pixel producer with random gaps.
  initial begin
    wait (all_loaded);
    for (int p = 0; p < N_PIXELS; p++) begin
      for (int i = 0; i < NF; i++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          s_valid = 1'b0;
          @(negedge clk);
        end
        s_valid = 1'b1;
        s_data  = px[p][i];
        while (!s_ready) begin
          n_in_stall++;
          @(negedge clk);
        end
        if (busy) n_overlap++;
        @(posedge clk);
      end
    end
    @(negedge clk);
    s_valid = 1'b0;
  end

  // Prediction consumer with random back-pressure, and result check.
  always @(negedge clk) begin
    if (all_loaded && !finished) begin
      // Runs of back-pressure of random length; m_ready set here holds until the
      // next falling edge, so the transfer at the coming rising edge is known now.
      // Now and then a long stall makes a finished pixel wait for the output register.
      if (hold_left > 0) begin
        hold_left--;
        m_ready = 1'b0;
      end else if ($urandom_range(0, 59) == 0) begin
        hold_left = $urandom_range(100, 1500);
        m_ready = 1'b0;
      end else if ($urandom_range(0, 9) < 3) m_ready = 1'b0;
      else if ($urandom_range(0, 9) < 5) m_ready = 1'b1;
      if (m_valid && m_ready) begin
        checks++;
        if (int'(m_class) != exp_class[got] || int'(m_score) != exp_score[got][exp_class[got]]) begin
          failures++;
          $display("pixel %0d: class %0d score %0d, expected class %0d score %0d", got, m_class,
                   $signed(m_score), exp_class[got], exp_score[got][exp_class[got]]);
        end
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (int'(m_scores[c]) != exp_score[got][c]) begin
            failures++;
            $display("pixel %0d class %0d: score %0d expected %0d", got, c, $signed(m_scores[c]),
                     exp_score[got][c]);
          end
        end
        got++;
      end
    end
  end

  // Cycle count from start to finish, and mechanism counters.
  int measuring = 0, cnt = 0, started = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (g_dut.dut.start_q) begin
        measuring = 1;
        cnt = 0;
      end else if (measuring != 0) begin
        cnt++;
        if (g_dut.dut.finish) begin
          measuring = 0;
          checks++;
          sum_cycles += cnt - 1;
          if (cnt - 1 != exp_cycles[started]) begin
            failures++;
            $display("pixel %0d: %0d cycles from start to finish, expected %0d", started, cnt - 1,
                     exp_cycles[started]);
          end
          started++;
        end
      end
      if (g_dut.dut.running && g_dut.dut.finish && !g_dut.dut.start_q && m_valid && !m_ready)
        n_out_hold++;
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_mon
    if (MT) begin : g_mt
      always @(negedge clk) begin
        if (g_dut.dut.g_cls[c].g_mt.u_cls.node_valid) begin
          if (g_dut.dut.g_cls[c].g_mt.u_cls.is_leaf) n_leaf++;
          else if (g_dut.dut.g_cls[c].g_mt.u_cls.node_right) n_right++;
          else n_left++;
        end
        if (g_dut.dut.g_cls[c].g_mt.u_cls.busy && g_dut.dut.g_cls[c].g_mt.u_cls.end_q != '0)
          n_set_done_early++;
      end
    end else begin : g_sc
      always @(negedge clk) begin
        if (g_dut.dut.g_cls[c].g_sc.u_cls.node_valid) begin
          if (g_dut.dut.g_cls[c].g_sc.u_cls.is_leaf) n_leaf++;
          else if (g_dut.dut.g_cls[c].g_sc.u_cls.node_right) n_right++;
          else n_left++;
        end
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (all_loaded);
    wait (got == N_PIXELS || finished);
    if (!finished) begin
      repeat (5) @(posedge clk);
      $display("%s engine, %0d classes, %0d features: %0d pixels", MT ? "multi-threaded" : "single-cycle",
               NC, NF, N_PIXELS);
      $display("  average cycles per pixel                 %0d", int'(sum_cycles / N_PIXELS));
      $display("  node words used in class 0 memory        %0d of %0d", m[0].size, 2 ** AW);
      begin
        longint sn;
        sn = 0;
        foreach (slow_nodes[p]) sn += slow_nodes[p];
        $display("  cycles per node of the busiest class     %0d.%03d", int'(sum_cycles / sn),
                 int'((sum_cycles * 1000 / sn) % 1000));
      end
      need("input back-pressure cycles", n_in_stall);
      need("features accepted during a computation", n_overlap);
      need("output capture held by back-pressure", n_out_hold);
      need("left-child steps", n_left);
      need("right-child steps", n_right);
      need("leaves (next-tree jumps)", n_leaf);
      if (MT) need("cycles with one tree set already finished", n_set_done_early);
      checks++;
      if (started != N_PIXELS) begin
        failures++;
        $display("%0d starts for %0d pixels", started, N_PIXELS);
      end
      finished = 1'b1;
    end
  end

endmodule
